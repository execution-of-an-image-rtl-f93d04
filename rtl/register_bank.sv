// register_bank - ten-register window over two image rows.
//
// Holds five horizontally adjacent pixels of row n (reg00..reg40) and of
// row n+1 (reg01..reg41). On shift = 1 the new source pixel enters reg41
// and every row n+1 register passes its value one place on (reg41 -> reg31
// -> ... -> reg01 -> line buffer); reg40 receives the oldest word of the
// line buffer and the other row n registers pass theirs on (reg40 -> reg30
// -> ... -> reg00). Index 0 is therefore the oldest (leftmost) column and
// index 4 the newest, and after a shift the window is centred on column
// reg2x, two columns behind the newest pixel. This follows the register
// bank of the document; the line buffer depth of LINE_LEN-5 follows from it.
//
// LINE_LEN is the number of shifts per image row (pixels plus any border
// padding the controller streams). Outputs are the register contents; they
// change on the clock edge after a shift.
module register_bank
  import scaler_pkg::*;
#(
  parameter int unsigned LINE_LEN = 164
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   shift,
  input  pixel_t pix_in,
  output pixel_t row_n  [5],  // reg00..reg40
  output pixel_t row_n1 [5]   // reg01..reg41
);

  pixel_t lb_out;

  line_buffer #(.DEPTH(LINE_LEN - 5), .W(PIX_W)) u_lb (
    .clk (clk),
    .rst (rst),
    .en  (shift),
    .din (row_n1[0]),
    .dout(lb_out)
  );

  always_ff @(posedge clk) begin
    if (shift) begin
      row_n1[4] <= pix_in;
      for (int i = 0; i < 4; i++) begin
        row_n1[i] <= row_n1[i+1];
        row_n[i]  <= row_n[i+1];
      end
    end
  end

  // reg40 is the registered read port of the line buffer.
  assign row_n[4] = lb_out;

endmodule
