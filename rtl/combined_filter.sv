// combined_filter - T-model sharpening filter and clamp filter merged into
// one kernel, two pipeline stages.
//
// The sharpening kernel [-1 S -1 / . -1 .]/(S-3) and the clamp kernel
// [1 C 1 / . 1 .]/(C+3) are convolved into one kernel. Its third row (a
// single -1) is folded into the centre of the second row so that only two
// image rows are needed:
//
//      main row : -1    S-C    S*C-2   S-C    -1
//      side row :       -2     S-C-1   -2
//      divided by (S-3)*(C+3)
//
// For the T model the main row is row n and the side row is row n+1 below
// it (result p'(m,n)); for the inverse T model the two rows swap roles
// (result p'(m,n+1)). The same module serves both; the caller wires the
// rows. The kernel and its division follow the document; rounding to
// nearest and clipping the result to 0..255 are this design's choices.
//
// Stage 1: three RCUs form (S-C)*main[1], (S-C)*main[3] and
// (S-C-1)*side[1]; a multiplier-adder forms (S*C-2)*main[2] - main[0];
// an adder with a shifter forms main[4] + 2*(side[0]+side[2]).
// Stage 2: the partial results are summed, rounded, shifted right by
// log2((S-3)(C+3)) and clipped. The result appears two clock edges after
// the pixels are presented (latency 2, one result per cycle).
module combined_filter
  import scaler_pkg::*;
(
  input  logic       clk,
  input  logic [1:0] s_sel,
  input  logic [1:0] c_sel,
  input  pixel_t     main_row [5],  // columns m-2 .. m+2
  input  pixel_t     side_row [3],  // columns m-1 .. m+1
  output pixel_t     pix_out
);

  localparam int unsigned RW = 16;

  logic signed [RW-1:0] rcu_l, rcu_r, rcu_c;
  logic signed [RW-1:0] s1_l, s1_r, s1_c;
  acc_t                 s1_ma;
  acc_t                 s1_neg;
  logic [3:0]           s1_sh;

  rcu #(.IN_W(10), .OUT_W(RW)) u_rcu_l (
    .x(10'(main_row[1])), .s_sel(s_sel), .c_sel(c_sel), .mode(1'b0), .y(rcu_l));
  rcu #(.IN_W(10), .OUT_W(RW)) u_rcu_r (
    .x(10'(main_row[3])), .s_sel(s_sel), .c_sel(c_sel), .mode(1'b0), .y(rcu_r));
  rcu #(.IN_W(10), .OUT_W(RW)) u_rcu_c (
    .x(10'(side_row[1])), .s_sel(s_sel), .c_sel(c_sel), .mode(1'b1), .y(rcu_c));

  // Stage 1
  always_ff @(posedge clk) begin
    s1_l   <= rcu_l;
    s1_r   <= rcu_r;
    s1_c   <= rcu_c;
    s1_ma  <= acc_t'(s_value(s_sel) * c_value(c_sel) - 2) * acc_t'(main_row[2])
              - acc_t'(main_row[0]);
    s1_neg <= acc_t'(main_row[4]) + ((acc_t'(side_row[0]) + acc_t'(side_row[2])) <<< 1);
    s1_sh  <= norm_shift(s_sel, c_sel);
  end

  // Stage 2
  acc_t sum;
  acc_t rounded;
  acc_t scaled;

  always_comb begin
    sum     = s1_ma + acc_t'(s1_l) + acc_t'(s1_r) + acc_t'(s1_c) - s1_neg;
    rounded = sum + (acc_t'(1) <<< (s1_sh - 4'd1));
    scaled  = rounded >>> s1_sh;
  end

  always_ff @(posedge clk) begin
    if (scaled < 0)        pix_out <= '0;
    else if (scaled > 255) pix_out <= 8'd255;
    else                   pix_out <= scaled[PIX_W-1:0];
  end

endmodule
