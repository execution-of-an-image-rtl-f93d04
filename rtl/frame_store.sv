// frame_store - on-chip memory for one captured frame.
//
// A simple dual-port memory of IMG_W*IMG_H pixels, row-major (address =
// row*IMG_W + column). The camera interface writes through the write port;
// the controller reads through the read port, whose data appears on rdata
// one clock after re is given (registered read, as in a block RAM). The
// storage decouples the sensor's pixel rate from the much slower serial
// output; it is this design's way of realising the frame-sized on-chip
// memory use reported for the processor.
module frame_store
  import scaler_pkg::*;
#(
  parameter int unsigned IMG_W = 160,
  parameter int unsigned IMG_H = 120
) (
  input  logic   clk,
  input  logic   we,
  input  logic [$clog2(IMG_W*IMG_H)-1:0] waddr,
  input  pixel_t wdata,
  input  logic   re,
  input  logic [$clog2(IMG_W*IMG_H)-1:0] raddr,
  output pixel_t rdata
);

  localparam int unsigned N = IMG_W * IMG_H;

  pixel_t mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
