// tb_full_size - one complete operation of the processor with every
// parameter at its default (160x120 frame, 115200 baud at a 50 MHz clock,
// 16-entry FIFO): a serial capture command, capture of a sensor frame,
// reduction to 120x90 (step 341/256 in both directions, sharpening S=11,
// clamp C=13), and transmission of all 10800 bytes, each checked against
// the golden model.
module tb_full_size;
  import scaler_ref_pkg::*;

  localparam int W = 160, H = 120, CPB = 434;
  localparam int OW = 120, OH = 90, SX = 341, SY = 341;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        busy, done, ev_prime, ev_stall;
  logic        pclk, vsync, href;
  logic [7:0]  cd;
  logic        rxd = 1'b1;
  logic        txd;
  int          frames, ferr;
  int          checks = 0, failures = 0, n_stall = 0, n_prime = 0;

  always #10 clk = ~clk;   // 50 MHz

  image_scaler_top dut (
    .clk(clk), .rst(rst), .start(1'b0), .s_sel(2'd1), .c_sel(2'd1),
    .step_x(16'(SX)), .step_y(16'(SY)), .out_w(16'(OW)), .out_h(16'(OH)),
    .busy(busy), .done(done), .ev_prime(ev_prime), .ev_stall(ev_stall),
    .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href), .cam_d(cd),
    .uart_rxd(rxd), .uart_txd(txd));

  cam_model #(.PCLK_HALF(40), .LINE_BLANK(20)) u_cam (.pclk(pclk), .vsync(vsync), .href(href), .d(cd), .frames(frames));
  uart_monitor #(.CLKS_PER_BIT(CPB)) u_mon (.clk(clk), .line(txd), .framing_errors(ferr));

  always @(posedge clk) begin
    if (ev_stall) n_stall++;
    if (ev_prime) n_prime++;
  end

  initial begin
    automatic int errs = 0;
    new_image(W, H, 0);
    repeat (5) @(posedge clk);
    rst = 1'b0;
    // command byte 'C' on the serial input
    rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = 1'(8'h43 >> i);
      repeat (CPB) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (CPB) @(posedge clk);
    checks++;
    if (!busy) begin failures++; $display("FAIL: command not taken"); end
    while (!done) @(posedge clk);
    repeat (2 * CPB) @(posedge clk);
    checks += 2;
    if (rx_q.size() != OW * OH) begin failures++; $display("FAIL: %0d bytes", rx_q.size()); end
    if (ferr != 0) begin failures++; $display("FAIL: framing errors"); end
    for (int l = 0; l < OH; l++)
      for (int k = 0; k < OW; k++)
        if (l * OW + k < rx_q.size()) begin
          automatic int e = scaled(k, l, SX, SY, 1, 1);
          checks++;
          if (int'(rx_q[l * OW + k]) != e) begin
            failures++;
            if (errs++ < 5) $display("FAIL: out(%0d,%0d) = %0d expected %0d", k, l, rx_q[l * OW + k], e);
          end
        end
    checks++;
    if (n_stall == 0 || n_prime == 0) begin failures++; $display("FAIL: no stall/priming seen"); end
    $display("stalls=%0d priming passes=%0d", n_stall, n_prime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
