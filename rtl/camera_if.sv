// camera_if - camera interfacing module.
//
// Captures one frame from a parallel-output image sensor. The sensor's
// PCLK, VSYNC, HREF and data lines are brought into the system clock
// domain through two-flop synchronisers (the data lines travel in the same
// chain as PCLK so they stay aligned with it), and a rising PCLK edge is
// detected there; the system clock must therefore run at least three
// times faster than PCLK. After a capture command the module waits for a
// VSYNC pulse (frame start) and its falling edge, then stores one pixel on
// each rising PCLK edge while HREF is high. The falling edge of HREF ends a
// line. The frame is complete when IMG_H lines have been taken or VSYNC
// rises again; frame_done then pulses for one cycle. Pixels beyond IMG_W in
// a line, or lines beyond IMG_H, are ignored.
//
// The signal roles (VSYNC frame start, HREF line valid, one pixel per PCLK)
// follow the document. One 8-bit luminance sample per PCLK, the
// synchroniser-based sampling and writing straight into the frame store
// (pix_we/pix_addr/pix_data, one write per pixel) are this design's choices.
module camera_if
  import scaler_pkg::*;
#(
  parameter int unsigned IMG_W = 160,
  parameter int unsigned IMG_H = 120
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       capture,     // command: take the next frame
  input  logic       cam_pclk,
  input  logic       cam_vsync,
  input  logic       cam_href,
  input  pixel_t     cam_d,
  output logic       pix_we,
  output logic [$clog2(IMG_W*IMG_H)-1:0] pix_addr,
  output pixel_t     pix_data,
  output logic       frame_done,
  output logic       busy
);

  localparam int unsigned AW = $clog2(IMG_W*IMG_H);
  localparam int unsigned XW = $clog2(IMG_W + 1);
  localparam int unsigned YW = $clog2(IMG_H + 1);

  typedef enum logic [1:0] {C_IDLE, C_WAIT_VS, C_WAIT_VS_END, C_LINES} cstate_e;
  cstate_e state;

  logic [2:0] pclk_s, vs_s, hr_s;
  pixel_t     d_s1, d_s2;
  logic       pclk_rise, vs_rise, vs_fall, href_fall;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [AW-1:0] line_base;

  always_ff @(posedge clk) begin
    if (rst) begin
      pclk_s <= '0;
      vs_s   <= '0;
      hr_s   <= '0;
    end else begin
      pclk_s <= {pclk_s[1:0], cam_pclk};
      vs_s   <= {vs_s[1:0],   cam_vsync};
      hr_s   <= {hr_s[1:0],   cam_href};
    end
    d_s1 <= cam_d;
    d_s2 <= d_s1;
  end

  assign pclk_rise = pclk_s[1] & ~pclk_s[2];
  assign vs_rise   = vs_s[1] & ~vs_s[2];
  assign vs_fall   = ~vs_s[1] & vs_s[2];
  assign href_fall = ~hr_s[1] & hr_s[2];

  always_ff @(posedge clk) begin
    pix_we     <= 1'b0;
    frame_done <= 1'b0;
    if (rst) begin
      state <= C_IDLE;
      x     <= '0;
      y     <= '0;
    end else begin
      unique case (state)
        C_IDLE:        if (capture) state <= C_WAIT_VS;
        C_WAIT_VS:     if (vs_rise) state <= C_WAIT_VS_END;
        C_WAIT_VS_END: if (vs_fall) begin
          state     <= C_LINES;
          x         <= '0;
          y         <= '0;
          line_base <= '0;
        end
        C_LINES: begin
          if (vs_rise) begin
            frame_done <= 1'b1;
            state      <= C_IDLE;
          end else if (href_fall) begin
            if (x != 0) begin
              x         <= '0;
              y         <= y + 1'b1;
              line_base <= line_base + AW'(IMG_W);
              if (y + 1'b1 == YW'(IMG_H)) begin
                frame_done <= 1'b1;
                state      <= C_IDLE;
              end
            end
          end else if (pclk_rise && hr_s[1]) begin
            if (x < XW'(IMG_W)) begin
              pix_we   <= 1'b1;
              pix_addr <= line_base + AW'(x);
              pix_data <= d_s2;
              x        <= x + 1'b1;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE);

endmodule
