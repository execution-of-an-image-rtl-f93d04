// tb_image_scaler_top - end-to-end test of the image scaling processor at a
// reduced image size (16x12), fast serial rate and a 4-entry FIFO so that
// every mechanism shows up in a short run. A sensor model supplies frames,
// a serial monitor collects the output bytes, and every byte is compared
// with the golden model. Operations: enlargement started by the serial
// command byte, reduction started by the start input, 1:1 copy, and a
// mixed enlarge/reduce, each with different S/C settings and pictures.
// Mechanisms counted (each must occur): priming passes, FIFO stalls,
// repeated use of one column pair (horizontal enlargement), right-border
// outputs, serial-command start.
module tb_image_scaler_top;
  import scaler_ref_pkg::*;

  localparam int W   = 16;
  localparam int H   = 12;
  localparam int CPB = 8;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        start = 1'b0;
  logic [1:0]  s_sel, c_sel;
  logic [15:0] step_x, step_y, out_w, out_h;
  logic        busy, done, ev_prime, ev_stall;
  logic        pclk, vsync, href;
  logic [7:0]  cd;
  logic        rxd = 1'b1;
  logic        txd;
  int          frames, ferr;
  int          checks = 0, failures = 0;
  int          n_prime = 0, n_stall = 0, n_repeat = 0, n_edge = 0, n_done = 0;

  always #5 clk = ~clk;

  image_scaler_top #(.IMG_W(W), .IMG_H(H), .CLKS_PER_BIT(CPB), .FIFO_DEPTH(4)) dut (
    .clk(clk), .rst(rst), .start(start), .s_sel(s_sel), .c_sel(c_sel),
    .step_x(step_x), .step_y(step_y), .out_w(out_w), .out_h(out_h),
    .busy(busy), .done(done), .ev_prime(ev_prime), .ev_stall(ev_stall),
    .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href), .cam_d(cd),
    .uart_rxd(rxd), .uart_txd(txd));

  cam_model #(.PCLK_HALF(20)) u_cam (.pclk(pclk), .vsync(vsync), .href(href), .d(cd), .frames(frames));
  uart_monitor #(.CLKS_PER_BIT(CPB)) u_mon (.clk(clk), .line(txd), .framing_errors(ferr));

  // mechanism counters
  logic last_was_emit = 1'b0;
  always @(posedge clk) begin
    if (ev_prime) n_prime++;
    if (ev_stall) n_stall++;
    if (done)     n_done++;
    if (dut.tok.emit) begin
      if (last_was_emit) n_repeat++;
      if (dut.tok.edge_col) n_edge++;
    end
    if (dut.tok.emit || dut.tok.shift) last_was_emit <= dut.tok.emit;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_byte(byte unsigned b);
    rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic run_op(int ow, int oh, int sx, int sy, int ss, int cs, int kind, bit via_uart);
    automatic int errs = 0;
    new_image(W, H, kind);
    rx_q.delete();
    out_w  = 16'(ow); out_h  = 16'(oh);
    step_x = 16'(sx); step_y = 16'(sy);
    s_sel  = 2'(ss);  c_sel  = 2'(cs);
    @(posedge clk);
    if (via_uart) send_byte(8'h43);
    else begin
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
    end
    @(posedge clk);
    check(busy, "busy after start command");
    while (!done) @(posedge clk);
    repeat (2 * CPB) @(posedge clk);
    check(rx_q.size() == ow * oh, $sformatf("byte count %0d, expected %0d", rx_q.size(), ow * oh));
    for (int l = 0; l < oh; l++)
      for (int k = 0; k < ow; k++) begin
        automatic int exp = scaled(k, l, sx, sy, ss, cs);
        automatic int idx = l * ow + k;
        if (idx < rx_q.size()) begin
          checks++;
          if (int'(rx_q[idx]) != exp) begin
            failures++;
            if (errs++ < 5) $display("FAIL: out(%0d,%0d) = %0d, expected %0d", k, l, rx_q[idx], exp);
          end
        end
      end
    $display("op %0dx%0d sel=%0d/%0d done, %0d bytes", ow, oh, ss, cs, rx_q.size());
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    run_op(24, 20, 170, 153, 1, 1, 0, 1'b1);   // enlarge 1.5x / 1.67x, serial command
    run_op(7, 5, 585, 614, 0, 2, 1, 1'b0);     // reduce
    run_op(16, 12, 256, 256, 2, 0, 2, 1'b0);   // 1:1
    run_op(9, 30, 448, 100, 3, 1, 3, 1'b1);    // reduce across, enlarge down
    check(n_done == 4, "done pulses");
    check(ferr == 0, "serial framing");
    check(n_prime > 0,  "priming pass happened");
    check(n_stall > 0,  "FIFO stall happened");
    check(n_repeat > 0, "column pair reused");
    check(n_edge > 0,   "right-border output happened");
    $display("mechanisms: prime=%0d stall=%0d repeat=%0d edge=%0d", n_prime, n_stall, n_repeat, n_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
