// tb_image_scaler - drives the scaling module with hand-made token streams.
// For several row pairs (n, n+1), including the clipped pair at the last
// row, it streams row n and then row n+1 (each with the two-pixel border
// repeat at both ends), and after every shift of the second row issues zero
// to three emit tokens with random dx, dy for the column pair now held,
// plus right-border (edge) emits at the end of the row. Every output is
// compared with the golden model, and each must appear exactly seven
// cycles after its emit token: one cycle into the register bank and the
// six pipeline stages (two filter, four interpolator).
module tb_image_scaler;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int W = 8;
  localparam int H = 4;
  localparam int L = W + 4;

  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] s_sel, c_sel;
  token_t tok;
  pixel_t pix_in;
  logic out_valid;
  pixel_t pix_out;
  int checks = 0, failures = 0, cyc = 0, n_emit = 0, n_edge = 0;
  int exp_q[$];
  int due_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  image_scaler #(.LINE_LEN(L)) dut (.clk(clk), .rst(rst), .s_sel(s_sel), .c_sel(c_sel),
                                    .tok(tok), .pix_in(pix_in), .out_valid(out_valid), .pix_out(pix_out));

  always @(posedge clk) if (!rst && out_valid) begin
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

  task automatic slot(bit sh, bit em, bit edge_c, int px, int dx, int dy);
    @(negedge clk);
    tok = '0;
    tok.shift = sh;
    tok.emit = em;
    tok.edge_col = edge_c;
    tok.dx = 8'(dx);
    tok.dy = 8'(dy);
    pix_in = 8'(px);
  endtask

  task automatic emit(int n, int n1, int m, bit edge_c);
    int dx = $urandom_range(0, 255);
    int dy = $urandom_range(0, 255);
    int m1 = edge_c ? m : m + 1;
    slot(0, 1, edge_c, $urandom, dx, dy);
    exp_q.push_back(bilin(filt(n, n1, m, int'(s_sel), int'(c_sel)), filt(n, n1, m1, int'(s_sel), int'(c_sel)),
                          filt(n1, n, m, int'(s_sel), int'(c_sel)), filt(n1, n, m1, int'(s_sel), int'(c_sel)), dx, dy));
    due_q.push_back(cyc + 7);
    n_emit++;
    if (edge_c) n_edge++;
  endtask

  task automatic pass(int r, bit emits, int n);
    for (int j = 0; j < L; j++) begin
      slot(1, 0, 0, pix(r, j - 2), 0, 0);
      if (emits && j >= 5) begin
        // after j+1 shifts the pair (j-5, j-4) is held
        repeat ($urandom_range(0, 3)) emit(n, r, j - 5, 1'b0);
      end
    end
    if (emits) repeat (2) emit(n, r, W - 1, 1'b1);
  endtask

  initial begin
    tok = '0;
    pix_in = '0;
    s_sel = 2'd1;
    c_sel = 2'd1;
    new_image(W, H, 0);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int it = 0; it < 12; it++) begin
      automatic int n = (it == 11) ? H - 1 : $urandom_range(0, H - 2);
      automatic int n1 = (n == H - 1) ? n : n + 1;
      s_sel = 2'($urandom_range(0, 2));
      c_sel = 2'($urandom_range(0, 2));
      if (it == 5) new_image(W, H, 2);
      pass(n, 1'b0, n);
      pass(n1, 1'b1, n);
      slot(0, 0, 0, 0, 0, 0);
      repeat (10) @(posedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || n_emit == 0 || n_edge == 0) begin
      failures++; $display("FAIL: outputs missing (%0d left)", exp_q.size());
    end
    $display("emits=%0d edge=%0d", n_emit, n_edge);
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
