// tb_uart_tx - sends random bytes through the transmitter (CLKS_PER_BIT =
// 16), decodes the line with the serial monitor and checks the bytes, the
// stop bits, the idle level, and that back-to-back bytes take exactly
// 10*CLKS_PER_BIT cycles each.
module tb_uart_tx;
  import scaler_ref_pkg::*;
  localparam int CPB = 16;
  logic clk = 1'b0, rst = 1'b1, valid = 1'b0, ready, idle, tx;
  logic [7:0] data = '0;
  int ferr;
  int checks = 0, failures = 0;
  byte unsigned sent[$];

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .valid(valid), .data(data), .ready(ready), .idle(idle), .tx(tx));
  uart_monitor #(.CLKS_PER_BIT(CPB)) u_mon (.clk(clk), .line(tx), .framing_errors(ferr));

  initial begin
    longint t0, t1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (tx !== 1'b1 || !ready) begin failures++; $display("FAIL: not idle after reset"); end
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      if (i == 10) t0 = $time;
      if (i == 20) t1 = $time;
      valid = 1'b1; data = 8'($urandom);
      sent.push_back(data);
      @(negedge clk) valid = 1'b0;
      if (i % 9 == 8) repeat ($urandom_range(1, 50)) @(negedge clk);
    end
    while (!idle) @(posedge clk);
    repeat (3 * CPB) @(posedge clk);
    checks += 2;
    if (rx_q.size() != sent.size()) begin failures++; $display("FAIL: %0d bytes seen", rx_q.size()); end
    if (ferr != 0) begin failures++; $display("FAIL: framing errors"); end
    for (int i = 0; i < sent.size() && i < rx_q.size(); i++) begin
      checks++;
      if (rx_q[i] != sent[i]) begin failures++; $display("FAIL: byte %0d %h exp %h", i, rx_q[i], sent[i]); end
    end
    // bytes 10..19 were given back to back (none of them after a pause)
    checks++;
    if (t1 - t0 != 10 * 10 * CPB * 10) begin
      failures++; $display("FAIL: 10 bytes took %0d time units", t1 - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
