// scaler_controller - finite state machine that sequences the processor.
//
// On a start command it arms the camera interface and waits for a whole
// frame to be stored. It then walks the output image row by row. Output row
// l lies at source height y = l*step_y, between source rows n = floor(y)
// and n+1 (clipped to the last row), with vertical weight dy = frac(y).
// The line buffer must hold row n while row n+1 streams through the
// register bank. If it does not already (it holds the row streamed last),
// row n is streamed once first without producing output: a priming pass.
// Repeated source rows when enlarging and skipped rows when reducing are
// both handled this way.
//
// A pass streams one source row as IMG_W+4 shifts: the first pixel twice
// more in front and the last pixel twice more behind, so the five-wide
// window replicates the border pixels. After sh shifts the filtered column
// pair (sh-6, sh-5) is held in the scaling module. During an emitting pass,
// output pixel k (source x = k*step_x, m = floor(x), dx = frac(x)) is
// emitted as soon as its pair is held; outputs at or past the last column
// use the last column for both neighbours. Emits take priority over shifts,
// so when enlarging the window waits while several outputs use the same
// pair. An emit is only issued when the output FIFO, counting pixels still
// inside the pipeline, has room; otherwise the controller stalls. When all
// rows are issued it waits for the pipeline, FIFO and UART to empty and
// pulses done.
//
// The document gives the controller's role (control and timing signals for
// the camera, register bank, filter, interpolator and UART); the pass
// schedule, border replication and FIFO credit scheme are this design's.
// Tokens leave on a register, one cycle after the frame-store read address
// is given, so the pixel read arrives together with its shift token.
module scaler_controller
  import scaler_pkg::*;
#(
  parameter int unsigned IMG_W      = 160,
  parameter int unsigned IMG_H      = 120,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        frame_done,
  input  logic [15:0] step_x,       // source columns per output column, Q8.FRAC_W
  input  logic [15:0] step_y,       // source rows per output row, Q8.FRAC_W
  input  logic [15:0] out_w,
  input  logic [15:0] out_h,
  input  logic        out_valid,    // a pixel left the scaling pipeline
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  input  logic        tx_idle,
  output logic        cam_start,
  output logic        fs_re,
  output logic [$clog2(IMG_W*IMG_H)-1:0] fs_raddr,
  output token_t      tok,
  output logic        busy,
  output logic        done,
  output logic        ev_prime,     // a priming pass starts
  output logic        ev_stall      // an emit waits for FIFO room
);

  localparam int unsigned AW   = $clog2(IMG_W*IMG_H);
  localparam int unsigned L    = IMG_W + 4;
  localparam int unsigned SHW  = $clog2(L + 1);
  localparam int unsigned RW   = $clog2(IMG_H);
  localparam int unsigned CW   = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned XW   = 32;

  typedef enum logic [2:0] {S_IDLE, S_CAPTURE, S_SETUP, S_PASS, S_DRAIN} state_e;
  state_e state;

  logic [XW-1:0]  x_acc, y_acc;
  logic [15:0]    k, l;
  logic [SHW-1:0] sh;
  logic [RW-1:0]  pass_row, lb_row;
  logic           pass_emit, lb_valid;
  logic [AW-1:0]  row_base;
  logic [CW:0]    inflight;

  logic [XW-FRAC_W-1:0] mk, ny;
  logic [RW-1:0]        n_row, n1_row;
  logic                 want_emit, do_emit, do_shift, pass_end, credit_ok, edge_k;
  logic [SHW-1:0]       col_raw;
  logic [AW-1:0]        col;

  always_comb begin
    mk        = x_acc[XW-1:FRAC_W];
    ny        = y_acc[XW-1:FRAC_W];
    n_row     = (ny >= (XW-FRAC_W)'(IMG_H - 1)) ? RW'(IMG_H - 1) : RW'(ny);
    n1_row    = (n_row == RW'(IMG_H - 1)) ? n_row : n_row + 1'b1;
    edge_k    = mk >= (XW-FRAC_W)'(IMG_W - 1);
    credit_ok = (CW+1)'(fifo_count) + inflight < (CW+1)'(FIFO_DEPTH);
    want_emit = (state == S_PASS) && pass_emit && (k < out_w) &&
                ((mk + 6 <= (XW-FRAC_W)'(sh)) || (sh == SHW'(L) && edge_k));
    do_emit   = want_emit && credit_ok;
    do_shift  = (state == S_PASS) && !want_emit && (sh != SHW'(L));
    pass_end  = (state == S_PASS) && !want_emit && (sh == SHW'(L));
    // streamed column: first and last pixel repeated twice
    col_raw   = (sh < SHW'(2)) ? '0 : sh - SHW'(2);
    col       = (col_raw > SHW'(IMG_W - 1)) ? AW'(IMG_W - 1) : AW'(col_raw);
    fs_re     = do_shift;
    fs_raddr  = row_base + col;
    ev_stall  = want_emit && !credit_ok;
  end

  always_ff @(posedge clk) begin
    tok          <= '0;
    tok.shift    <= do_shift;
    tok.emit     <= do_emit;
    tok.edge_col <= edge_k;
    tok.dx       <= x_acc[FRAC_W-1:0];
    tok.dy       <= y_acc[FRAC_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) inflight <= '0;
    else     inflight <= inflight + (CW+1)'(do_emit) - (CW+1)'(out_valid);
  end

  always_ff @(posedge clk) begin
    cam_start <= 1'b0;
    done      <= 1'b0;
    ev_prime  <= 1'b0;
    if (rst) begin
      state    <= S_IDLE;
      lb_valid <= 1'b0;
      sh       <= '0;
      k        <= '0;
      l        <= '0;
      x_acc    <= '0;
      y_acc    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          cam_start <= 1'b1;
          state     <= S_CAPTURE;
        end
        S_CAPTURE: if (frame_done) begin
          l        <= '0;
          y_acc    <= '0;
          lb_valid <= 1'b0;
          state    <= (out_h == 0 || out_w == 0) ? S_DRAIN : S_SETUP;
        end
        S_SETUP: begin
          sh    <= '0;
          k     <= '0;
          x_acc <= '0;
          if (lb_valid && lb_row == n_row) begin
            pass_row  <= n1_row;
            pass_emit <= 1'b1;
            row_base  <= AW'(n1_row * IMG_W);
          end else begin
            pass_row  <= n_row;
            pass_emit <= 1'b0;
            row_base  <= AW'(n_row * IMG_W);
            ev_prime  <= 1'b1;
          end
          state <= S_PASS;
        end
        S_PASS: begin
          if (do_shift) sh <= sh + 1'b1;
          if (do_emit) begin
            k     <= k + 1'b1;
            x_acc <= x_acc + XW'(step_x);
          end
          if (pass_end) begin
            lb_row   <= pass_row;
            lb_valid <= 1'b1;
            if (pass_emit) begin
              l     <= l + 1'b1;
              y_acc <= y_acc + XW'(step_y);
              state <= (l + 1'b1 == out_h) ? S_DRAIN : S_SETUP;
            end else begin
              state <= S_SETUP;
            end
          end
        end
        S_DRAIN: if (inflight == 0 && fifo_count == 0 && tx_idle) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
