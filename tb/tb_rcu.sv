// tb_rcu - checks the reconfigurable calculation unit against a plain
// multiplication by (S-C) or (S-C-1) for every S/C selection (codes 0..3)
// and both modes, over all 8-bit operands and a sweep of signed operands.
module tb_rcu;
  import scaler_ref_pkg::*;

  logic signed [9:0]  x;
  logic [1:0]         s_sel, c_sel;
  logic               mode;
  logic signed [15:0] y;
  int checks = 0, failures = 0;

  rcu #(.IN_W(10), .OUT_W(16)) dut (.x(x), .s_sel(s_sel), .c_sel(c_sel), .mode(mode), .y(y));

  initial begin
    for (int s = 0; s < 4; s++)
      for (int c = 0; c < 4; c++)
        for (int md = 0; md < 2; md++)
          for (int v = -512; v < 512; v += 3) begin
            int exp;
            x = 10'(v); s_sel = 2'(s); c_sel = 2'(c); mode = md[0];
            #1;
            exp = v * (sval(s) - cval(c) - md);
            checks++;
            if (int'(y) != exp) begin
              failures++;
              if (failures < 10) $display("FAIL: x=%0d S=%0d C=%0d mode=%0d y=%0d exp=%0d",
                                          v, sval(s), cval(c), md, y, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
