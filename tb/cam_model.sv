// cam_model - behavioural model of a parallel-output image sensor, for
// simulation only. Sends frames of scaler_ref_pkg::img continuously: a
// VSYNC pulse of 3 pixel periods, 5 idle periods, then img_h lines, each
// with HREF high for img_w PCLK periods followed by LINE_BLANK idle
// periods. Data changes on the falling edge of PCLK and is stable at its
// rising edge. frames counts the frames started.
module cam_model #(
  parameter int PCLK_HALF  = 20,   // time units
  parameter int LINE_BLANK = 6
) (
  output logic       pclk,
  output logic       vsync,
  output logic       href,
  output logic [7:0] d,
  output int         frames
);

  initial begin
    pclk = 1'b0;
    forever #(PCLK_HALF) pclk = ~pclk;
  end

  task automatic wait_periods(int n);
    repeat (n) @(negedge pclk);
  endtask

  initial begin
    vsync  = 1'b0;
    href   = 1'b0;
    d      = '0;
    frames = 0;
    wait_periods(4);
    forever begin
      vsync = 1'b1;
      frames++;
      wait_periods(3);
      vsync = 1'b0;
      wait_periods(5);
      for (int y = 0; y < scaler_ref_pkg::img_h; y++) begin
        for (int x = 0; x < scaler_ref_pkg::img_w; x++) begin
          href = 1'b1;
          d    = 8'(scaler_ref_pkg::img[y*scaler_ref_pkg::img_w + x]);
          wait_periods(1);
        end
        href = 1'b0;
        d    = 8'h00;
        wait_periods(LINE_BLANK);
      end
    end
  end

endmodule
