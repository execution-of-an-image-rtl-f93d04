// tb_uart_rx - drives random 8N1 bytes (CLKS_PER_BIT = 32) into the
// receiver, with about 3 percent of bit-time error and random gaps, and
// checks each received byte; frames with a low stop bit and a short glitch
// must produce no byte.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 1'b0, rst = 1'b1, rx = 1'b1, valid;
  logic [7:0] data;
  int checks = 0, failures = 0;
  byte unsigned exp_q[$];

  always #5 clk = ~clk;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk(clk), .rst(rst), .rx(rx), .valid(valid), .data(data));

  always @(posedge clk) if (!rst && valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected byte %h", data); end
    else begin
      automatic byte unsigned e = exp_q.pop_front();
      if (data != e) begin failures++; $display("FAIL: got %h exp %h", data, e); end
    end
  end

  task automatic send(byte unsigned b, bit stop, int bit_len);
    rx = 1'b0;
    repeat (bit_len) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (bit_len) @(posedge clk);
    end
    rx = stop;
    repeat (bit_len) @(posedge clk);
    rx = 1'b1;
    repeat (bit_len) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      automatic byte unsigned b;
      b = 8'($urandom);
      if (i % 10 == 7) begin
        send(b, 1'b0, CPB);          // bad stop bit: dropped
        repeat (2 * CPB) @(posedge clk);
      end else if (i % 10 == 3) begin
        rx = 1'b0;                   // glitch shorter than half a bit
        repeat (3) @(posedge clk);
        rx = 1'b1;
        repeat (2 * CPB) @(posedge clk);
      end else begin
        exp_q.push_back(b);
        send(b, 1'b1, (i % 2 == 0) ? CPB : CPB + 1);
      end
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    repeat (4 * CPB) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d bytes missing", exp_q.size()); end
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
