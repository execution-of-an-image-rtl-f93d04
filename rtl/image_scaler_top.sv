// image_scaler_top - real-time image scaling processor.
//
// A capture command (the start input, or the byte CMD_CAPTURE received on
// the serial line) makes the camera interface store the next sensor frame
// in the frame store. The controller then streams the stored rows through
// the image scaling module (register bank with one line buffer, T-model and
// inverse T-model combined sharpening/clamp filters, bilinear
// interpolator) and the scaled pixels, row-major, one byte each, go through
// a small FIFO to the UART transmitter. done pulses when the last byte has
// left the transmitter.
//
// The output size (out_w x out_h) and the source steps per output pixel
// (step_x, step_y: unsigned, 8 fractional bits; 256 = 1.0) are inputs, so
// any scale factor can be chosen at run time; for a plain resize set
// step = 256*IMG_W/out_w (and likewise vertically). s_sel and c_sel pick the
// sharpening weight S (7, 11, 19) and clamp weight C (5, 13, 29).
// Parameters must be held steady while busy is high.
//
// The block structure (camera interface, scaling module, controller, UART)
// follows the document; the frame store, the FIFO, the command byte and
// all sizes are this design's choices.
module image_scaler_top
  import scaler_pkg::*;
#(
  parameter int unsigned IMG_W        = 160,
  parameter int unsigned IMG_H        = 120,
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter logic [7:0]  CMD_CAPTURE  = 8'h43
) (
  input  logic        clk,
  input  logic        rst,
  // capture command and scaling settings
  input  logic        start,
  input  logic [1:0]  s_sel,
  input  logic [1:0]  c_sel,
  input  logic [15:0] step_x,
  input  logic [15:0] step_y,
  input  logic [15:0] out_w,
  input  logic [15:0] out_h,
  output logic        busy,
  output logic        done,
  output logic        ev_prime,   // a source row is re-streamed to refill the line buffer
  output logic        ev_stall,   // an output pixel waits for room in the FIFO
  // image sensor
  input  logic        cam_pclk,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  pixel_t      cam_d,
  // serial link to the host
  input  logic        uart_rxd,
  output logic        uart_txd
);

  localparam int unsigned AW = $clog2(IMG_W*IMG_H);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic          rx_valid;
  logic [7:0]    rx_data;
  logic          cmd_start;
  logic          cam_start, frame_done, cam_busy;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  pixel_t        wdata, rdata;
  logic          re;
  token_t        tok;
  logic          sc_valid;
  pixel_t        sc_pix;
  logic          f_empty;
  logic          ctrl_busy;
  logic [CW-1:0] f_count;
  pixel_t        f_dout;
  logic          tx_ready, tx_idle;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk(clk), .rst(rst), .rx(uart_rxd), .valid(rx_valid), .data(rx_data));

  assign cmd_start = start | (rx_valid && rx_data == CMD_CAPTURE);

  camera_if #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cam (
    .clk       (clk),
    .rst       (rst),
    .capture   (cam_start),
    .cam_pclk  (cam_pclk),
    .cam_vsync (cam_vsync),
    .cam_href  (cam_href),
    .cam_d     (cam_d),
    .pix_we    (we),
    .pix_addr  (waddr),
    .pix_data  (wdata),
    .frame_done(frame_done),
    .busy      (cam_busy)
  );

  frame_store #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fs (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rdata(rdata));

  scaler_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .FIFO_DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .start     (cmd_start),
    .frame_done(frame_done),
    .step_x    (step_x),
    .step_y    (step_y),
    .out_w     (out_w),
    .out_h     (out_h),
    .out_valid (sc_valid),
    .fifo_count(f_count),
    .tx_idle   (tx_idle),
    .cam_start (cam_start),
    .fs_re     (re),
    .fs_raddr  (raddr),
    .tok       (tok),
    .busy      (ctrl_busy),
    .done      (done),
    .ev_prime  (ev_prime),
    .ev_stall  (ev_stall)
  );

  image_scaler #(.LINE_LEN(IMG_W + 4)) u_scaler (
    .clk      (clk),
    .rst      (rst),
    .s_sel    (s_sel),
    .c_sel    (c_sel),
    .tok      (tok),
    .pix_in   (rdata),
    .out_valid(sc_valid),
    .pix_out  (sc_pix)
  );

  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(PIX_W)) u_fifo (
    .clk  (clk),
    .rst  (rst),
    .push (sc_valid),
    .din  (sc_pix),
    .pop  (tx_ready && !f_empty),
    .dout (f_dout),
    .empty(f_empty),
    .full (),
    .count(f_count)
  );

  assign busy = ctrl_busy | cam_busy;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk(clk), .rst(rst), .valid(!f_empty), .data(f_dout), .ready(tx_ready), .idle(tx_idle),
    .tx(uart_txd));

endmodule
