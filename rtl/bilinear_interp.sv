// bilinear_interp - four-stage pipelined bilinear interpolator.
//
// Computes
//   P = (1-dx)(1-dy) a + dx(1-dy) b + (1-dx)dy c + dx dy d
// with a = p'(m,n), b = p'(m+1,n), c = p'(m,n+1), d = p'(m+1,n+1) and dx,
// dy the fractional source position (FRAC_W fractional bits). The sum is
// reordered so that three multipliers do the work of eight: first
// horizontally, top = a + dx(b-a) and bottom = c + dx(d-c), then
// vertically, P = top + dy(bottom-top). The interpolation formula and its
// one-direction-then-the-other evaluation follow the document; the staging
// below and rounding to nearest on the final shift are this design's.
//
//   stage 3: differences b-a and d-c
//   stage 4: horizontal multiply-adds (top, bottom)
//   stage 5: vertical difference bottom-top
//   stage 6: vertical multiply-add, rounding, output register
//
// in_valid/out_valid mark the samples; the latency is 4 cycles and a new
// sample may enter on every cycle.
module bilinear_interp
  import scaler_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  pixel_t a,
  input  pixel_t b,
  input  pixel_t c,
  input  pixel_t d,
  input  frac_t  dx,
  input  frac_t  dy,
  output logic   out_valid,
  output pixel_t pix_out
);

  localparam int unsigned HW = PIX_W + FRAC_W + 2;      // horizontal result, signed
  localparam int unsigned VW = PIX_W + 2*FRAC_W + 3;    // vertical result, signed

  logic [3:0] vld;

  // stage 3
  logic signed [PIX_W:0] s3_dt, s3_db;
  pixel_t                s3_a, s3_c;
  frac_t                 s3_dx, s3_dy;
  // stage 4
  logic signed [HW-1:0]  s4_top, s4_bot;
  frac_t                 s4_dy;
  // stage 5
  logic signed [HW-1:0]  s5_top, s5_dv;
  frac_t                 s5_dy;
  // stage 6
  logic signed [VW-1:0]  vsum;
  pixel_t                vpix;

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    s3_dt  <= $signed({1'b0, b}) - $signed({1'b0, a});
    s3_db  <= $signed({1'b0, d}) - $signed({1'b0, c});
    s3_a   <= a;
    s3_c   <= c;
    s3_dx  <= dx;
    s3_dy  <= dy;

    s4_top <= $signed(HW'({s3_a, {FRAC_W{1'b0}}})) + HW'(s3_dt * $signed({1'b0, s3_dx}));
    s4_bot <= $signed(HW'({s3_c, {FRAC_W{1'b0}}})) + HW'(s3_db * $signed({1'b0, s3_dx}));
    s4_dy  <= s3_dy;

    s5_top <= s4_top;
    s5_dv  <= s4_bot - s4_top;
    s5_dy  <= s4_dy;

    pix_out <= vpix;
  end

  always_comb begin
    vsum = (VW'(s5_top) <<< FRAC_W) + VW'(s5_dv * $signed({1'b0, s5_dy}))
           + (VW'(1) <<< (2*FRAC_W - 1));
    // a convex combination of 8-bit values: bits above the pixel stay zero
    vpix = PIX_W'(vsum >>> (2*FRAC_W));
  end

  assign out_valid = vld[3];

endmodule
