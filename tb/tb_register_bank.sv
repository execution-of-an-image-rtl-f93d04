// tb_register_bank - streams a numbered pixel sequence into a register bank
// with a 9-pixel line and checks, after every shift, that row n+1 holds the
// five newest pixels (reg41 newest) and row n the five pixels exactly one
// line earlier, i.e. the line buffer aligns the two rows column by column.
module tb_register_bank;
  import scaler_pkg::*;
  localparam int L = 9;
  logic clk = 1'b0, rst = 1'b1, shift = 1'b0;
  pixel_t pix_in = '0;
  pixel_t row_n [5];
  pixel_t row_n1 [5];
  int checks = 0, failures = 0;
  pixel_t seq[$];

  always #5 clk = ~clk;

  register_bank #(.LINE_LEN(L)) dut (.clk(clk), .rst(rst), .shift(shift), .pix_in(pix_in),
                                     .row_n(row_n), .row_n1(row_n1));

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 200; i++) begin
      shift  <= ($urandom_range(0, 4) != 0);
      pix_in <= 8'($urandom);
      @(posedge clk);
      #1;
      if (shift) seq.push_back(pix_in);
      if (seq.size() >= L + 5) begin
        automatic int t = seq.size() - 1;
        for (int c = 0; c < 5; c++) begin
          checks += 2;
          if (row_n1[c] != seq[t - (4 - c)]) begin
            failures++; $display("FAIL: reg%0d1=%0h exp %0h", c, row_n1[c], seq[t - (4 - c)]);
          end
          if (row_n[c] != seq[t - (4 - c) - L]) begin
            failures++; $display("FAIL: reg%0d0=%0h exp %0h", c, row_n[c], seq[t - (4 - c) - L]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
