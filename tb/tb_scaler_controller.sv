// tb_scaler_controller - runs the controller against a model of its
// surroundings: frame_done some time after cam_start, a seven-cycle
// pipeline turning emits into out_valid, and a 4-entry FIFO drained slowly.
// For an enlargement and a reduction it checks
//   - the frame-store read addresses, in order, against the expected row
//     passes (priming pass when the line buffer does not hold row n, then
//     the emitting pass of row n+1, each with the border pixels repeated),
//   - the dx, dy and edge flag of every emit, in output order,
//   - that every emit comes only after the pixels it needs were read,
//   - that the FIFO never overflows (credit scheme) and stalls happen,
//   - the start/done handshake and that nothing is read before the frame.
module tb_scaler_controller;
  import scaler_pkg::*;

  localparam int W = 8, H = 6, L = W + 4, FD = 4;

  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0, frame_done = 1'b0;
  logic [15:0] step_x, step_y, out_w, out_h;
  logic out_valid = 1'b0;
  logic [2:0] fifo_count = '0;
  logic tx_idle;
  logic cam_start, fs_re, busy, done, ev_prime, ev_stall;
  logic [$clog2(W*H)-1:0] fs_raddr;
  token_t tok;
  int checks = 0, failures = 0, n_stall = 0, n_prime = 0;
  int exp_addr[$];
  int exp_emit[$];     // {edge, dx, dy} packed
  int emit_need[$];    // needed last column, row
  int last_col = -1, last_row = -1;
  logic [6:0] pipe = '0;
  bit frame_ok = 0;
  int drain_cnt = 0;

  always #5 clk = ~clk;

  scaler_controller #(.IMG_W(W), .IMG_H(H), .FIFO_DEPTH(FD)) dut (
    .clk(clk), .rst(rst), .start(start), .frame_done(frame_done),
    .step_x(step_x), .step_y(step_y), .out_w(out_w), .out_h(out_h),
    .out_valid(out_valid), .fifo_count(fifo_count), .tx_idle(tx_idle),
    .cam_start(cam_start), .fs_re(fs_re), .fs_raddr(fs_raddr), .tok(tok),
    .busy(busy), .done(done), .ev_prime(ev_prime), .ev_stall(ev_stall));

  assign tx_idle = (fifo_count == 0);

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL: %s", s);
  endtask

  // environment: pipeline delay and FIFO
  always @(posedge clk) begin
    if (rst) begin
      pipe <= '0;
      fifo_count <= '0;
      out_valid <= 1'b0;
    end else begin
      pipe <= {pipe[5:0], tok.emit};
      out_valid <= pipe[5];
      drain_cnt <= (drain_cnt + 1) % 6;
      fifo_count <= fifo_count + 3'(out_valid) - 3'(drain_cnt == 0 && fifo_count != 0);
      if (out_valid && fifo_count == 3'(FD) && !(drain_cnt == 0)) fail("FIFO overflow");
    end
  end

  // checkers
  always @(posedge clk) if (!rst) begin
    if (ev_stall) n_stall++;
    if (ev_prime) n_prime++;
    if (fs_re) begin
      checks++;
      if (!frame_ok) fail("read before frame stored");
      if (exp_addr.size() == 0) fail("unexpected read");
      else begin
        automatic int e = exp_addr.pop_front();
        if (int'(fs_raddr) != e) fail($sformatf("read addr %0d expected %0d", fs_raddr, e));
      end
      last_col = int'(fs_raddr) % W;
      last_row = int'(fs_raddr) / W;
    end
    if (tok.emit) begin
      checks += 2;
      if (exp_emit.size() == 0) fail("unexpected emit");
      else begin
        automatic int e = exp_emit.pop_front();
        automatic int nd = emit_need.pop_front();
        automatic int got = int'({tok.edge_col, tok.dx, tok.dy});
        if (got != e) fail($sformatf("emit %h expected %h", got, e));
        // the read feeding the newest needed column must lie before the emit
        if (last_row != nd / 100 || last_col < nd % 100)
          fail($sformatf("emit too early: row %0d col %0d, need %0d", last_row, last_col, nd));
      end
    end
  end

  function automatic void build(int ow, int oh, int sx, int sy);
    int lb = -1;
    for (int l = 0; l < oh; l++) begin
      int y = l * sy;
      int n = y >> 8, n1;
      if (n > H - 1) n = H - 1;
      n1 = (n == H - 1) ? n : n + 1;
      if (lb != n)
        for (int j = 0; j < L; j++) exp_addr.push_back(n * W + ((j < 2) ? 0 : (j - 2 > W - 1) ? W - 1 : j - 2));
      for (int j = 0; j < L; j++) exp_addr.push_back(n1 * W + ((j < 2) ? 0 : (j - 2 > W - 1) ? W - 1 : j - 2));
      lb = n1;
      for (int k = 0; k < ow; k++) begin
        int x = k * sx;
        int m = x >> 8;
        bit edge_c = (m >= W - 1);
        exp_emit.push_back(int'({edge_c, 8'(x), 8'(y)}));
        emit_need.push_back(n1 * 100 + ((m + 3 > W - 1) ? W - 1 : m + 3));
      end
    end
  endfunction

  task automatic run(int ow, int oh, int sx, int sy);
    int t;
    out_w = 16'(ow); out_h = 16'(oh); step_x = 16'(sx); step_y = 16'(sy);
    build(ow, oh, sx, sy);
    frame_ok = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    checks++;
    if (!cam_start) fail("no cam_start pulse");
    repeat (50) @(negedge clk);
    frame_done = 1'b1; frame_ok = 1;
    @(negedge clk) frame_done = 1'b0;
    t = 0;
    while (!done && t < 50000) begin @(posedge clk); t++; end
    checks += 3;
    if (!done) fail("no done");
    if (exp_addr.size() != 0) fail($sformatf("%0d reads missing", exp_addr.size()));
    if (exp_emit.size() != 0) fail($sformatf("%0d emits missing", exp_emit.size()));
    @(negedge clk);
    checks++;
    if (busy || fifo_count != 0) fail("not idle after done");
  endtask

  initial begin
    step_x = 0; step_y = 0; out_w = 0; out_h = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run(13, 11, 151, 130);   // enlarge
    run(3, 4, 683, 384);     // reduce
    run(10, 3, 200, 600);    // mixed, rows past the last clip to it
    checks += 2;
    if (n_stall == 0) fail("no stall seen");
    if (n_prime == 0) fail("no priming pass seen");
    $display("stalls=%0d primes=%0d", n_stall, n_prime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
