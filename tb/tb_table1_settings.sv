// tb_table1_settings - runs the whole processor once for each of the nine
// sharpening/clamp settings of the parameter table (C = 5, 13, 29 and
// S = 7, 11, 19) on a 16x12 frame enlarged 2x to 32x24, and compares every
// output byte with the golden model.
module tb_table1_settings;
  import scaler_ref_pkg::*;

  localparam int W = 16, H = 12, CPB = 4, OW = 32, OH = 24, STEP = 128;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        start = 1'b0;
  logic [1:0]  s_sel = '0, c_sel = '0;
  logic        busy, done, ev_prime, ev_stall;
  logic        pclk, vsync, href;
  logic [7:0]  cd;
  logic        txd;
  int          frames, ferr;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  image_scaler_top #(.IMG_W(W), .IMG_H(H), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst(rst), .start(start), .s_sel(s_sel), .c_sel(c_sel),
    .step_x(16'(STEP)), .step_y(16'(STEP)), .out_w(16'(OW)), .out_h(16'(OH)),
    .busy(busy), .done(done), .ev_prime(ev_prime), .ev_stall(ev_stall),
    .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href), .cam_d(cd),
    .uart_rxd(1'b1), .uart_txd(txd));

  cam_model #(.PCLK_HALF(20)) u_cam (.pclk(pclk), .vsync(vsync), .href(href), .d(cd), .frames(frames));
  uart_monitor #(.CLKS_PER_BIT(CPB)) u_mon (.clk(clk), .line(txd), .framing_errors(ferr));

  initial begin
    new_image(W, H, 0);
    repeat (5) @(posedge clk);
    rst = 1'b0;
    for (int s = 0; s < 3; s++)
      for (int c = 0; c < 3; c++) begin
        automatic int errs = 0;
        rx_q.delete();
        s_sel = 2'(s);
        c_sel = 2'(c);
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        while (!done) @(posedge clk);
        repeat (4 * CPB) @(posedge clk);
        checks++;
        if (rx_q.size() != OW * OH) begin failures++; $display("FAIL: %0d bytes", rx_q.size()); end
        for (int i = 0; i < OW * OH && i < rx_q.size(); i++) begin
          automatic int e = scaled(i % OW, i / OW, STEP, STEP, s, c);
          checks++;
          if (int'(rx_q[i]) != e) begin
            failures++;
            if (errs++ < 3) $display("FAIL: S=%0d C=%0d out %0d = %0d expected %0d", sval(s), cval(c), i, rx_q[i], e);
          end
        end
        $display("S=%0d C=%0d: %0d bytes checked", sval(s), cval(c), rx_q.size());
      end
    checks++;
    if (ferr != 0) begin failures++; $display("FAIL: framing errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
