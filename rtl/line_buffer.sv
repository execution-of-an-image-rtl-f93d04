// line_buffer - one-line delay memory of the register bank.
//
// A circular buffer of DEPTH words. On every cycle with en = 1 the word at
// the pointer is read into dout (the old contents: read-before-write) and
// din is written in its place, then the pointer advances. A word written on
// one enabled cycle therefore appears on dout DEPTH enabled cycles later.
// Inside the register bank dout is register reg40, and din is the value
// shifted out of reg01, so DEPTH = line length - 5 makes reg40 receive the
// pixel directly above the one entering reg41. The buffer is a plain array,
// suitable for a block RAM with a registered read port.
module line_buffer #(
  parameter int unsigned DEPTH = 159,
  parameter int unsigned W     = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     ptr <= '0;
    else if (en) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

endmodule
