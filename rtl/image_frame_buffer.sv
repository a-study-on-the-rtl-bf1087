// image_frame_buffer -- binary image memory, one bit per pixel, stored in
// raster order (address = row * W + column).
//
// Interface: one write port (we, waddr, wdata), written at the rising clock
// edge, and one read port whose data appears one cycle after an address
// presented with re high (rdata is registered, as in a synchronous compiled
// SRAM, and holds its value while re is low). A read and a
// write of the same address in one cycle return the old value.
// The memory has no reset: its contents are whatever was last written.
// The organisation (1-bit words, one read and one write port) is this
// design's choice; the image size defaults to 96 x 96 pixels.
module image_frame_buffer #(
  parameter int unsigned W      = 96,
  parameter int unsigned H      = 96,
  parameter int unsigned ADDR_W = $clog2(W * H)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic              wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic              rdata
);

  logic mem [W*H];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
