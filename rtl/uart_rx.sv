// uart_rx - serial receiver (8 data bits, no parity, 1 stop bit).
//
// Takes command bytes from the host. The line is synchronised with two
// flip-flops; a falling edge starts a frame, the start bit is re-checked
// half a bit later, and each following bit is sampled in its middle, one
// bit time (CLKS_PER_BIT cycles) apart, least significant bit first. If the
// stop bit is high, valid pulses for one cycle with the byte on data; a
// frame with a low stop bit is dropped. Frame format and rate are this
// design's choice; the document only says the link is serial.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;
  rstate_e state;

  logic [1:0]    rx_s;
  logic [CW-1:0] cnt;
  logic [2:0]    idx;
  logic [7:0]    sh;

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      rx_s  <= 2'b11;
      state <= R_IDLE;
      cnt   <= '0;
      idx   <= '0;
    end else begin
      rx_s <= {rx_s[0], rx};
      unique case (state)
        R_IDLE: if (!rx_s[1]) begin
          state <= R_START;
          cnt   <= '0;
        end
        R_START: if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
          cnt   <= '0;
          idx   <= '0;
          state <= rx_s[1] ? R_IDLE : R_DATA;
        end else cnt <= cnt + 1'b1;
        R_DATA: if (cnt == CW'(CLKS_PER_BIT - 1)) begin
          cnt <= '0;
          sh  <= {rx_s[1], sh[7:1]};
          idx <= idx + 1'b1;
          if (idx == 3'd7) state <= R_STOP;
        end else cnt <= cnt + 1'b1;
        R_STOP: if (cnt == CW'(CLKS_PER_BIT - 1)) begin
          cnt   <= '0;
          state <= R_IDLE;
          if (rx_s[1]) begin
            valid <= 1'b1;
            data  <= sh;
          end
        end else cnt <= cnt + 1'b1;
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
