// tb_line_buffer - feeds a 7-word line buffer random words with random idle
// cycles and checks that each word comes out exactly DEPTH enabled cycles
// after it went in, and that idle cycles hold the output.
module tb_line_buffer;
  localparam int DEPTH = 7;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [7:0] din = '0, dout;
  int checks = 0, failures = 0;
  byte unsigned hist[$];

  always #5 clk = ~clk;

  line_buffer #(.DEPTH(DEPTH), .W(8)) dut (.clk(clk), .rst(rst), .en(en), .din(din), .dout(dout));

  initial begin
    logic [7:0] held;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      en  <= ($urandom_range(0, 3) != 0);
      din <= 8'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        hist.push_back(din);
        if (hist.size() > DEPTH) begin
          checks++;
          if (dout != hist[hist.size() - 1 - DEPTH]) begin
            failures++;
            $display("FAIL: step %0d dout=%0h exp=%0h", i, dout, hist[hist.size() - 1 - DEPTH]);
          end
        end
        held = dout;
      end else if (hist.size() > DEPTH) begin
        checks++;
        if (dout != held) begin failures++; $display("FAIL: output changed while idle"); end
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
