// tb_frame_store - writes a random picture into a 12x5 frame store, then
// reads it back in random order with simultaneous writes to other words,
// checking each read value one cycle after the read request and that the
// read register holds while re is low.
module tb_frame_store;
  import scaler_pkg::*;
  localparam int W = 12, H = 5, N = W * H;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [$clog2(N)-1:0] waddr = '0, raddr = '0;
  pixel_t wdata = '0, rdata;
  int model[N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_store #(.IMG_W(W), .IMG_H(H)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                           .re(re), .raddr(raddr), .rdata(rdata));

  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'(i); wdata = 8'($urandom); model[i] = int'(wdata);
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < 500; i++) begin
      automatic int a = $urandom_range(0, N - 1);
      automatic int b = $urandom_range(0, N - 1);
      automatic int exp;
      automatic pixel_t held;
      @(negedge clk);
      re = 1'b1; raddr = 6'(a);
      exp = model[a];
      we = (b != a); waddr = 6'(b); wdata = 8'($urandom);
      if (we) model[b] = int'(wdata);
      @(negedge clk);
      re = 1'b0; we = 1'b0;
      checks++;
      if (int'(rdata) != exp) begin failures++; $display("FAIL: addr %0d read %0d exp %0d", a, rdata, exp); end
      held = rdata;
      raddr = 6'(b);
      @(negedge clk);
      checks++;
      if (rdata != held) begin failures++; $display("FAIL: read port changed with re low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
