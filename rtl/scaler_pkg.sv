// scaler_pkg - types, constants and helper functions shared by the image
// scaling processor.
//
// Pixels are 8-bit unsigned luminance values. The sharpening weight S and
// the clamp weight C are chosen from the three values each of the parameter
// table (C = 5, 13, 29 and S = 7, 11, 19). All six values satisfy
// S - 3 = 2^(s_sel+2) and C + 3 = 2^(c_sel+3), so the normalisation of the
// combined filter by (S-3)*(C+3) is a right shift by s_sel+c_sel+5. The
// 2-bit select codes 0..2 pick the table entries; code 3 is treated as 2.
// Bilinear weights dx, dy and the source-coordinate steps are unsigned fixed
// point numbers with FRAC_W fractional bits (a width of this design's own
// choosing).
package scaler_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned FRAC_W = 8;

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [FRAC_W-1:0] frac_t;

  // Work width of the combined-filter accumulator (signed).
  localparam int unsigned ACC_W = 22;
  typedef logic signed [ACC_W-1:0] acc_t;

  // One slot of the scaling pipeline, issued by the controller.
  //   shift : a new source pixel enters the register bank this cycle
  //   emit  : produce one output pixel from the current filtered pair
  //   edge  : the output lies on or past the last source column, use the
  //           last filtered column for both horizontal neighbours
  typedef struct packed {
    logic  shift;
    logic  emit;
    logic  edge_col;
    frac_t dx;
    frac_t dy;
  } token_t;

  function automatic logic [1:0] sel_clip(input logic [1:0] sel);
    return (sel == 2'd3) ? 2'd2 : sel;
  endfunction

  // Sharpening weight S = 2^(sel+2) + 3 -> 7, 11, 19.
  function automatic int s_value(input logic [1:0] s_sel);
    return (1 << (int'(sel_clip(s_sel)) + 2)) + 3;
  endfunction

  // Clamp weight C = 2^(sel+3) - 3 -> 5, 13, 29.
  function automatic int c_value(input logic [1:0] c_sel);
    return (1 << (int'(sel_clip(c_sel)) + 3)) - 3;
  endfunction

  // log2((S-3)*(C+3)): right shift that normalises the combined filter.
  function automatic logic [3:0] norm_shift(input logic [1:0] s_sel,
                                            input logic [1:0] c_sel);
    return 4'(sel_clip(s_sel)) + 4'(sel_clip(c_sel)) + 4'd5;
  endfunction

endpackage
