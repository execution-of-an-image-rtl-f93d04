// tb_bilinear_interp - feeds random samples (with random gaps) and checks
// every output against the four-weight bilinear formula, and that each
// result appears exactly four cycles after its inputs.
module tb_bilinear_interp;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  pixel_t a, b, c, d, pix_out;
  frac_t dx, dy;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_q[$];
  int due_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  bilinear_interp dut (.clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .c(c), .d(d),
                       .dx(dx), .dy(dy), .out_valid(out_valid), .pix_out(pix_out));

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin failures += 2; $display("FAIL: unexpected output"); end
      else begin
        automatic int e = exp_q.pop_front();
        automatic int t = due_q.pop_front();
        if (int'(pix_out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: out=%0d exp=%0d", pix_out, e);
        end
        if (cyc != t) begin failures++; $display("FAIL: latency, cycle %0d expected %0d", cyc, t); end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      if (i % 7 == 0) begin a = 255; b = 255; c = 255; d = 255; end
      dx = (i % 11 == 0) ? 8'hff : 8'($urandom);
      dy = (i % 13 == 0) ? 8'h00 : 8'($urandom);
      if (in_valid) begin
        exp_q.push_back(bilin(int'(a), int'(b), int'(c), int'(d), int'(dx), int'(dy)));
        due_q.push_back(cyc + 4);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: missing outputs"); end
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
