// uart_tx - serial transmitter (8 data bits, no parity, 1 stop bit).
//
// Sends the scaled pixels to the host, least significant bit first. A byte
// is accepted when valid and ready are both high; ready is low while a
// frame is on the line, except in the last cycle of the stop bit, so that
// bytes given back to back follow each other without a gap. Each bit lasts CLKS_PER_BIT clock cycles, so one
// byte takes 10*CLKS_PER_BIT cycles. The line idles high. The default
// (434) gives 115200 baud from a 50 MHz clock; frame format and rate are
// this design's choice, the document only naming the UART.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       idle,    // nothing on the line
  output logic       tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [9:0]    shreg;   // stop, data[7:0], start
  logic [3:0]    bits;    // bits still to send
  logic [CW-1:0] cnt;

  logic last_tick;   // final cycle of the stop bit

  assign last_tick = (bits == 4'd1) && (cnt == CW'(CLKS_PER_BIT - 1));
  assign ready     = (bits == 0) || last_tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      bits  <= '0;
      cnt   <= '0;
      shreg <= '1;
    end else if (ready && valid) begin
      shreg <= {1'b1, data, 1'b0};
      bits  <= 4'd10;
      cnt   <= '0;
    end else if (bits == 0) begin
      cnt <= '0;
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      shreg <= {1'b1, shreg[9:1]};
      bits  <= bits - 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign tx   = (bits == 0) ? 1'b1 : shreg[0];
  assign idle = (bits == 0);

endmodule
