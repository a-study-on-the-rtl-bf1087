// thinning_top -- fingerprint thinning processor with its image memory.
//
// A host loads a binary fingerprint image (1 = black ridge) into image
// buffer 0 through the load port, pulses 'start', waits for 'done' and reads
// the one-pixel-wide skeleton back from buffer 0 through the readout port.
// Inside, zs_thinning_core runs the Zhang-Suen sub-iterations, reading one
// buffer and writing the other; the two buffers swap roles every
// sub-iteration, so the result always ends in buffer 0.
//
// Interface (addresses are row * W + column, row 0 at the top):
//   load port    host_we / host_waddr / host_wdata, written at the clock
//                edge; ignored while busy.
//   readout port host_rdata carries the pixel at host_raddr one cycle later;
//                valid while not busy.
//   control      start (taken when idle), busy, done (one-cycle pulse),
//                iter_count (whole iterations of the last run, including the
//                final one that erased nothing).
//   status       step (sub-iteration in progress), erase_pulse (high in the
//                cycle a pixel is written as erased).
// Timing is that of zs_thinning_core.
//
// Next to the processor, and independent of it, sits a row of the GDI
// primitive-cell models (base cell / MUX, OR4, AND4, XOR2, XOR3 and the
// master-slave flip-flop) with their own pins, cell_*, so that the cell
// library can be exercised in the same netlist:
//   cell_in[0] is the common input A (the GDI gate input), cell_in[1..3]
//   are B, C, D; cell_mux_y = gdi_cell(g=A, p=B, n=C); cell_or_y / cell_and_y
//   are the 4-input cells on A..D; cell_xor2_y = A^B; cell_xor3_y = A^B^C;
//   cell_dff_q is the flip-flop clocked by cell_ck with data D.
//
// The image size defaults to 96 x 96 pixels as in the design this follows;
// the host port, the pair of buffers and the cell row are this design's
// choice.
module thinning_top
  import zs_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned ADDR_W = $clog2(W * H),
  parameter int unsigned ITER_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [ITER_W-1:0] iter_count,
  output zs_step_e          step,         // sub-iteration in progress
  output logic              erase_pulse,  // a pixel is being erased
  // image load port (buffer 0)
  input  logic              host_we,
  input  logic [ADDR_W-1:0] host_waddr,
  input  logic              host_wdata,
  // image readout port (buffer 0)
  input  logic [ADDR_W-1:0] host_raddr,
  output logic              host_rdata,
  // GDI primitive-cell row
  input  logic [3:0]        cell_in,
  input  logic              cell_ck,
  output logic              cell_mux_y,
  output logic              cell_or_y,
  output logic              cell_and_y,
  output logic              cell_xor2_y,
  output logic              cell_xor3_y,
  output logic              cell_dff_q
);

  logic              src_sel;
  logic              rd_en, wr_en, wr_data;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  logic              rd_data;

  logic              b0_we, b1_we, b0_wdata;
  logic [ADDR_W-1:0] b0_waddr, b0_raddr;
  logic              b0_re;
  logic              b0_rdata, b1_rdata;

  zs_thinning_core #(
    .W     (W),
    .H     (H),
    .ADDR_W(ADDR_W),
    .ITER_W(ITER_W)
  ) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .busy       (busy),
    .done       (done),
    .iter_count (iter_count),
    .src_sel    (src_sel),
    .step       (step),
    .rd_en      (rd_en),
    .rd_addr    (rd_addr),
    .rd_data    (rd_data),
    .wr_en      (wr_en),
    .wr_addr    (wr_addr),
    .wr_data    (wr_data),
    .erase_pulse(erase_pulse)
  );

  // Buffer 0: host port while idle; core destination when src_sel = 1,
  // core source when src_sel = 0.
  always_comb begin
    if (busy) begin
      b0_we    = wr_en && src_sel;
      b0_waddr = wr_addr;
      b0_wdata = wr_data;
      b0_raddr = rd_addr;
      b0_re    = rd_en && !src_sel;
    end else begin
      b0_we    = host_we;
      b0_waddr = host_waddr;
      b0_wdata = host_wdata;
      b0_raddr = host_raddr;
      b0_re    = 1'b1;
    end
    b1_we   = busy && wr_en && !src_sel;
    rd_data = src_sel ? b1_rdata : b0_rdata;
  end

  assign host_rdata = b0_rdata;

  image_frame_buffer #(.W(W), .H(H), .ADDR_W(ADDR_W)) u_buf0 (
    .clk  (clk),
    .we   (b0_we),
    .waddr(b0_waddr),
    .wdata(b0_wdata),
    .re   (b0_re),
    .raddr(b0_raddr),
    .rdata(b0_rdata)
  );

  image_frame_buffer #(.W(W), .H(H), .ADDR_W(ADDR_W)) u_buf1 (
    .clk  (clk),
    .we   (b1_we),
    .waddr(wr_addr),
    .wdata(wr_data),
    .re   (rd_en && src_sel),
    .raddr(rd_addr),
    .rdata(b1_rdata)
  );

  // GDI primitive-cell row
  gdi_cell        u_gdi_mux  (.g(cell_in[0]), .p(cell_in[1]), .n(cell_in[2]), .out(cell_mux_y));
  gdi_or  #(.N(4)) u_gdi_or4  (.a(cell_in), .y(cell_or_y));
  gdi_and #(.N(4)) u_gdi_and4 (.a(cell_in), .y(cell_and_y));
  gdi_xor2        u_gdi_xor2 (.a(cell_in[0]), .b(cell_in[1]), .y(cell_xor2_y));
  gdi_xor3        u_gdi_xor3 (.a(cell_in[0]), .b(cell_in[1]), .c(cell_in[2]), .y(cell_xor3_y));
  gdi_dff         u_gdi_dff  (.ck(cell_ck), .d(cell_in[3]), .q(cell_dff_q));

endmodule
