// sync_fifo - small first-in first-out buffer between the scaling pipeline
// and the UART transmitter.
//
// DEPTH words of W bits. push writes din when not full; pop removes the
// head, which is always visible on dout while empty is low (first-word
// fall-through). count gives the number of stored words. Pushing into a
// full FIFO or popping an empty one is a protocol error (asserted); the
// controller's credit scheme prevents the former. The FIFO is this design's
// addition for rate matching.
module sync_fifo #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push && !full) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop && !empty) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  assign dout  = mem[rp];
  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));

  assert property (@(posedge clk) disable iff (rst) !(push && full));
  assert property (@(posedge clk) disable iff (rst) !(pop && empty));

endmodule
