// image_scaler - the image scaling module: register bank, T-model and
// inverse T-model combined filters and the bilinear interpolator, run as
// one pipeline driven by tokens from the controller.
//
// Each cycle the controller may present one token (see scaler_pkg):
//   shift - pix_in enters the register bank (reg41); the window moves one
//           source column on and, two cycles later, the two combined
//           filters deliver p'(c,n) and p'(c,n+1) for its centre column c.
//           These become the current filtered column; the previous current
//           column is kept, so the pair (m, m+1) = (previous, current) is
//           held for the interpolator without any further line memory.
//   emit  - one output pixel is interpolated from the held pair with the
//           token's dx and dy. With edge_col set the current column is used
//           for both horizontal neighbours (right image border).
// The filters are pipeline stages 1-2 and the interpolator stages 3-6, so
// an output pixel appears on pix_out/out_valid six cycles after the window
// it uses is in the register bank (seven after the emit token is given).
// Tokens are carried alongside the data so that an emit always sees the
// pair formed by all shifts issued before it. No stall exists inside: the
// controller only issues an emit when the output side has room.
module image_scaler
  import scaler_pkg::*;
#(
  parameter int unsigned LINE_LEN = 164   // shifts per streamed source row
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] s_sel,
  input  logic [1:0] c_sel,
  input  token_t     tok,
  input  pixel_t     pix_in,
  output logic       out_valid,
  output pixel_t     pix_out
);

  pixel_t row_n  [5];
  pixel_t row_n1 [5];
  pixel_t pf_n, pf_n1;            // p'(c,n), p'(c,n+1) from the filters
  pixel_t cur_n, cur_n1;          // filtered column m+1
  pixel_t prv_n, prv_n1;          // filtered column m
  token_t tok1, tok2, tok3;       // token beside filter input, stage 1, stage 2
  logic   tok1_v, tok2_v, tok3_v;

  register_bank #(.LINE_LEN(LINE_LEN)) u_bank (
    .clk   (clk),
    .rst   (rst),
    .shift (tok.shift),
    .pix_in(pix_in),
    .row_n (row_n),
    .row_n1(row_n1)
  );

  // T model: main row n, side row n+1.
  combined_filter u_filt_t (
    .clk     (clk),
    .s_sel   (s_sel),
    .c_sel   (c_sel),
    .main_row(row_n),
    .side_row('{row_n1[1], row_n1[2], row_n1[3]}),
    .pix_out (pf_n)
  );

  // Inverse T model: main row n+1, side row n.
  combined_filter u_filt_it (
    .clk     (clk),
    .s_sel   (s_sel),
    .c_sel   (c_sel),
    .main_row(row_n1),
    .side_row('{row_n[1], row_n[2], row_n[3]}),
    .pix_out (pf_n1)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      tok1_v <= 1'b0;
      tok2_v <= 1'b0;
      tok3_v <= 1'b0;
    end else begin
      tok1_v <= tok.shift | tok.emit;
      tok2_v <= tok1_v;
      tok3_v <= tok2_v;
    end
    tok1 <= tok;
    tok2 <= tok1;
    tok3 <= tok2;
  end

  // Filtered column pair, updated when a shift token leaves the filters.
  always_ff @(posedge clk) begin
    if (tok3_v && tok3.shift) begin
      prv_n  <= cur_n;
      prv_n1 <= cur_n1;
      cur_n  <= pf_n;
      cur_n1 <= pf_n1;
    end
  end

  bilinear_interp u_interp (
    .clk      (clk),
    .rst      (rst),
    .in_valid (tok3_v && tok3.emit),
    .a        (tok3.edge_col ? cur_n  : prv_n),
    .b        (cur_n),
    .c        (tok3.edge_col ? cur_n1 : prv_n1),
    .d        (cur_n1),
    .dx       (tok3.dx),
    .dy       (tok3.dy),
    .out_valid(out_valid),
    .pix_out  (pix_out)
  );

  // A slot is either a shift or an emit, never both.
  assert property (@(posedge clk) disable iff (rst) !(tok.shift && tok.emit));

endmodule
