// uart_monitor - decodes an 8N1 serial line for simulation and appends each
// received byte to scaler_ref_pkg::rx_q. Counts bytes with a bad stop bit
// in framing_errors.
module uart_monitor #(
  parameter int CLKS_PER_BIT = 434
) (
  input  logic clk,
  input  logic line,
  output int   framing_errors
);

  initial begin
    byte unsigned b;
    framing_errors = 0;
    forever begin
      @(negedge line);
      repeat (CLKS_PER_BIT + CLKS_PER_BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = line;
        repeat (CLKS_PER_BIT) @(posedge clk);
      end
      if (!line) framing_errors++;
      scaler_ref_pkg::rx_q.push_back(b);
    end
  end

endmodule
