// tb_combined_filter - presents a new random (or extreme) window on every
// cycle with random S/C selections and checks each result, two cycles
// later, against the full combined kernel of the golden model. This also
// checks the two-stage latency and one-result-per-cycle rate.
module tb_combined_filter;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  logic clk = 1'b0;
  logic [1:0] s_sel, c_sel;
  pixel_t main_row [5];
  pixel_t side_row [3];
  pixel_t pix_out;
  int checks = 0, failures = 0;
  int exp_q[$];

  always #5 clk = ~clk;

  combined_filter dut (.clk(clk), .s_sel(s_sel), .c_sel(c_sel),
                       .main_row(main_row), .side_row(side_row), .pix_out(pix_out));

  initial begin
    int m[5];
    int sd[3];
    for (int i = 0; i < 3000; i++) begin
      automatic int mode = $urandom_range(0, 3);
      for (int j = 0; j < 5; j++)
        m[j] = (mode == 0) ? $urandom_range(0, 255) : (mode == 1) ? (($urandom_range(0, 1) != 0) ? 255 : 0)
             : (mode == 2) ? 128 + $urandom_range(0, 8) : $urandom_range(0, 255);
      for (int j = 0; j < 3; j++)
        sd[j] = (mode == 1) ? (($urandom_range(0, 1) != 0) ? 255 : 0) : $urandom_range(0, 255);
      @(negedge clk);
      s_sel = 2'($urandom_range(0, 3));
      c_sel = 2'($urandom_range(0, 3));
      foreach (main_row[j]) main_row[j] = 8'(m[j]);
      foreach (side_row[j]) side_row[j] = 8'(sd[j]);
      exp_q.push_back(filt_win(m, sd, int'(s_sel), int'(c_sel)));
      if (exp_q.size() > 2) begin
        automatic int e = exp_q.pop_front();
        checks++;
        if (int'(pix_out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: step %0d out=%0d exp=%0d", i, pix_out, e);
        end
      end
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
