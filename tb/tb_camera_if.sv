// tb_camera_if - a sensor model sends 10x6 frames continuously (PCLK at a
// quarter of the system clock). The test checks that nothing is written
// before a capture command, that after the command exactly one whole frame
// is written, each pixel once to row*W+column with the sensor's value, and
// that frame_done pulses once. It then captures a second, different frame
// and checks that too.
module tb_camera_if;
  import scaler_pkg::*;
  import scaler_ref_pkg::*;

  localparam int W = 10, H = 6;

  logic clk = 1'b0, rst = 1'b1, capture = 1'b0;
  logic pclk, vsync, href;
  logic [7:0] d;
  int frames;
  logic pix_we, frame_done, busy;
  logic [$clog2(W*H)-1:0] pix_addr;
  pixel_t pix_data;
  int checks = 0, failures = 0;
  int got[W*H];
  int writes = 0, dones = 0;

  always #5 clk = ~clk;

  cam_model #(.PCLK_HALF(20), .LINE_BLANK(4)) u_cam (.pclk(pclk), .vsync(vsync), .href(href), .d(d), .frames(frames));

  camera_if #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst(rst), .capture(capture), .cam_pclk(pclk), .cam_vsync(vsync),
    .cam_href(href), .cam_d(d), .pix_we(pix_we), .pix_addr(pix_addr), .pix_data(pix_data),
    .frame_done(frame_done), .busy(busy));

  always @(posedge clk) if (!rst) begin
    if (pix_we) begin
      writes++;
      if (int'(pix_addr) < W*H) got[pix_addr] = int'(pix_data);
    end
    if (frame_done) dones++;
  end

  task automatic grab(int kind);
    int f0;
    new_image(W, H, kind);
    foreach (got[i]) got[i] = -1;
    writes = 0; dones = 0;
    @(negedge clk) capture = 1'b1;
    @(negedge clk) capture = 1'b0;
    f0 = frames;
    while (dones == 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks += 3;
    if (writes != W*H) begin failures++; $display("FAIL: %0d writes", writes); end
    if (dones != 1) begin failures++; $display("FAIL: %0d done pulses", dones); end
    if (busy) begin failures++; $display("FAIL: still busy"); end
    foreach (got[i]) begin
      checks++;
      if (got[i] != img[i]) begin
        failures++;
        if (failures < 10) $display("FAIL: pixel %0d = %0d expected %0d", i, got[i], img[i]);
      end
    end
  endtask

  initial begin
    new_image(W, H, 0);
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // a whole frame passes with no command: nothing may be written
    wait (frames == 2);
    checks++;
    if (writes != 0) begin failures++; $display("FAIL: write without command"); end
    grab(0);
    grab(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
