// rcu - reconfigurable calculation unit.
//
// Multiplies a signed operand by one of the small coefficients that the
// combined filter needs, (S-C) when mode = 0 or (S-C-1) when mode = 1,
// without a multiplier. With S = 2^a + 3 and C = 2^b - 3 (a = s_sel+2,
// b = c_sel+3, see scaler_pkg) the coefficients decompose as
//   S-C   = 2^a - 2^b + 4 + 2
//   S-C-1 = 2^a - 2^b + 4 + 1
// so the product is the sum of four shifted copies of the operand:
//   x<<a      shift amount chosen by a multiplexer on s_sel
//   x<<b      shift amount chosen by a multiplexer on c_sel, then negated
//             by the sign circuit
//   x<<2      fixed shift
//   x<<1 / x  chosen by a multiplexer on mode
// added by three adders. This gives the document's four shifters, three
// multiplexers, three adders and one sign circuit; the exact wiring of the
// document's unit is not given, and this decomposition is this design's.
// It covers every coefficient of the parameter table, from -23 to +14.
//
// Purely combinational: y follows x, s_sel, c_sel and mode in the same cycle.
module rcu
  import scaler_pkg::*;
#(
  parameter int unsigned IN_W  = 10,  // signed operand width
  parameter int unsigned OUT_W = 16   // signed result width
) (
  input  logic signed [IN_W-1:0]  x,
  input  logic [1:0]              s_sel,
  input  logic [1:0]              c_sel,
  input  logic                    mode,   // 0: S-C, 1: S-C-1
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] xe;
  logic signed [OUT_W-1:0] t_s, t_c, t_4, t_m;

  always_comb begin
    xe = OUT_W'(x);
    // shifter + multiplexer for the S term: a = 2, 3, 4
    unique case (sel_clip(s_sel))
      2'd0:    t_s = xe <<< 2;
      2'd1:    t_s = xe <<< 3;
      default: t_s = xe <<< 4;
    endcase
    // shifter + multiplexer for the C term: b = 3, 4, 5, then the sign circuit
    unique case (sel_clip(c_sel))
      2'd0:    t_c = -(xe <<< 3);
      2'd1:    t_c = -(xe <<< 4);
      default: t_c = -(xe <<< 5);
    endcase
    // fixed shifter
    t_4 = xe <<< 2;
    // shifter + multiplexer for the mode term: 2 for S-C, 1 for S-C-1
    t_m = mode ? xe : (xe <<< 1);
    // three adders
    y = (t_s + t_c) + (t_4 + t_m);
  end

endmodule
