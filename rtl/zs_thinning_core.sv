// zs_thinning_core -- Zhang-Suen fingerprint thinning processor.
//
// The processor thins a binary image (1 = black ridge, 0 = white) down to a
// one-pixel-wide skeleton. One thinning iteration is two sub-iterations. In
// each, every pixel is judged on the image as it stood at the start of the
// sub-iteration (the algorithm is parallel), so the core reads a source image
// and writes the result to a separate destination image. The two image
// buffers swap roles every sub-iteration (src_sel): the first sub-iteration
// reads buffer 0 and writes buffer 1, the second reads buffer 1 and writes
// buffer 0, so after each whole iteration the image is back in buffer 0.
// Iterations repeat until one whole iteration erases no pixel; the result is
// then in buffer 0.
//
// Scan: the image is processed row by row, left to right. A 3x3 window
// (zs_window_buffer) is cleared at the start of each row and then receives
// one column of three pixels (rows r-1, r, r+1) at a time. Pixels outside the
// image are read as white and are not fetched from memory. After the column
// right of pixel (r, c) has arrived, the window is centred on (r, c), the
// erase decision (zs_erase_logic) is made and the destination pixel written
// with centre AND NOT erase.
//
// Memory interface: rd_addr is valid while rd_en is high and rd_data must
// carry that pixel one cycle later (synchronous read). wr_en/wr_addr/wr_data
// write the destination buffer. Addresses are row * W + column.
//
// Timing: a column fetch takes 4 cycles (three reads, the last datum is
// shifted in on the 4th) and a pixel write 1 cycle, so a row costs
// 1 (clear) + 4 (first column) + 5*W cycles and a sub-iteration
// H*(5 + 5*W) + 1 cycles. 'done' pulses for one cycle 2*iters*that + 1
// cycles after 'start' was taken (iters = iter_count at the end, counting the
// final iteration that erases nothing). For 96 x 96 a sub-iteration is
// 46,561 cycles.
//
// The algorithm (window, conditions, two sub-iterations, repeat until no
// change) follows the thinning method. The memory organisation, ping-pong
// buffers, the scan order, white padding around the image, the stop rule
// "a whole iteration without erasure" and all timing are this design's own.
module zs_thinning_core
  import zs_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned ADDR_W = $clog2(W * H),
  parameter int unsigned ITER_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,       // begin thinning buffer 0 (ignored while busy)
  output logic              busy,
  output logic              done,        // one-cycle pulse at the end
  output logic [ITER_W-1:0] iter_count,  // whole iterations performed
  output logic              src_sel,     // buffer read this sub-iteration
  output zs_step_e          step,        // current sub-iteration
  // source image read port
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_data,
  // destination image write port
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic              wr_data,
  // one-cycle pulse for every erased pixel
  output logic              erase_pulse
);

  localparam int unsigned RW = $clog2(H + 1);
  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_ROW,
    ST_FETCH,
    ST_WRITE,
    ST_STEPEND
  } state_e;

  state_e        state;
  logic [RW-1:0] row;
  logic [CW-1:0] fcol;      // column being fetched (W = white column right of the image)
  logic [1:0]    phase;     // position inside a column fetch
  logic          rd_valid;  // the read issued last cycle was a real pixel
  logic [1:0]    col_buf;   // rows r-1 and r of the column being fetched
  logic          erased_1;  // first sub-iteration erased a pixel
  logic          erased_cur;

  logic          win_clear, win_shift;
  logic [2:0]    win_col;
  window_t       win;
  logic          erase;
  logic          fetch_row_ok;
  logic [RW-1:0] fetch_row;
  logic          pix_in;

  zs_window_buffer u_win (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (win_clear),
    .shift (win_shift),
    .col_in(win_col),
    .win   (win)
  );

  zs_erase_logic u_erase (
    .win  (win),
    .step (step),
    .erase(erase)
  );

  assign busy = (state != ST_IDLE);

  // Read address of the current fetch phase (rows r-1, r, r+1).
  always_comb begin
    fetch_row    = row;
    fetch_row_ok = 1'b0;
    unique case (phase)
      2'd0: begin
        fetch_row    = row - RW'(1);
        fetch_row_ok = (row != '0);
      end
      2'd1: begin
        fetch_row    = row;
        fetch_row_ok = 1'b1;
      end
      2'd2: begin
        fetch_row    = row + RW'(1);
        fetch_row_ok = (row != RW'(H - 1));
      end
      default: begin
        fetch_row    = row;
        fetch_row_ok = 1'b0;
      end
    endcase
    rd_en   = (state == ST_FETCH) && fetch_row_ok && (fcol != CW'(W));
    rd_addr = ADDR_W'(fetch_row) * ADDR_W'(W) + ADDR_W'(fcol);
  end

  assign pix_in    = rd_valid & rd_data;
  assign win_clear = (state == ST_ROW);
  assign win_shift = (state == ST_FETCH) && (phase == 2'd3);
  assign win_col   = {pix_in, col_buf[1], col_buf[0]};

  // Write port: the window is centred on (row, fcol-1) in ST_WRITE.
  always_comb begin
    wr_en       = (state == ST_WRITE);
    wr_addr     = ADDR_W'(row) * ADDR_W'(W) + ADDR_W'(fcol) - ADDR_W'(1);
    wr_data     = win.center & ~erase;
    erase_pulse = (state == ST_WRITE) && erase;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      row        <= '0;
      fcol       <= '0;
      phase      <= '0;
      rd_valid   <= 1'b0;
      col_buf    <= '0;
      erased_1   <= 1'b0;
      erased_cur <= 1'b0;
      step       <= ZS_STEP1;
      src_sel    <= 1'b0;
      iter_count <= '0;
      done       <= 1'b0;
    end else begin
      done     <= 1'b0;
      rd_valid <= rd_en;
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            state      <= ST_ROW;
            row        <= '0;
            step       <= ZS_STEP1;
            src_sel    <= 1'b0;
            iter_count <= '0;
            erased_1   <= 1'b0;
            erased_cur <= 1'b0;
          end
        end

        ST_ROW: begin
          fcol  <= '0;
          phase <= '0;
          state <= ST_FETCH;
        end

        ST_FETCH: begin
          phase <= phase + 2'd1;
          if (phase == 2'd1) col_buf[0] <= pix_in;
          if (phase == 2'd2) col_buf[1] <= pix_in;
          if (phase == 2'd3) begin
            if (fcol == '0) fcol  <= CW'(1);  // first column only primes the window
            else            state <= ST_WRITE;
          end
        end

        ST_WRITE: begin
          if (erase) erased_cur <= 1'b1;
          if (fcol == CW'(W)) begin
            if (row == RW'(H - 1)) begin
              state <= ST_STEPEND;
            end else begin
              row   <= row + RW'(1);
              state <= ST_ROW;
            end
          end else begin
            fcol  <= fcol + CW'(1);
            phase <= '0;
            state <= ST_FETCH;
          end
        end

        ST_STEPEND: begin
          row     <= '0;
          src_sel <= ~src_sel;
          if (step == ZS_STEP1) begin
            step       <= ZS_STEP2;
            erased_1   <= erased_cur;
            erased_cur <= 1'b0;
            state      <= ST_ROW;
          end else begin
            step       <= ZS_STEP1;
            iter_count <= iter_count + ITER_W'(1);
            erased_cur <= 1'b0;
            if (erased_1 || erased_cur) begin
              state <= ST_ROW;
            end else begin
              state <= ST_IDLE;
              done  <= 1'b1;
            end
          end
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

  // Every memory access stays inside the image, and the two ports are never
  // used while idle.
  a_rd_in_image: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> (32'(rd_addr) < W * H));
  a_wr_in_image: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (32'(wr_addr) < W * H));
  a_idle_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    !busy |-> !(rd_en || wr_en));

endmodule
