// zs_window_buffer -- the 3x3 pixel window, held as three columns of three
// pixels and filled one column at a time while the image is scanned left to
// right.
//
// Interface: 'clear' empties the window (all white), which is how the scan
// starts each row with the white column left of the image. 'shift' moves the
// window one column to the right: the left column drops out and col_in
// (bit 0 = row above, bit 1 = current row, bit 2 = row below) becomes the
// right column. clear wins over shift. win is the registered window mapped to
// the P1..P8 numbering of zs_pkg. Reset empties the window.
// The column-wise window and its update rule are this design's choice.
module zs_window_buffer
  import zs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       shift,
  input  logic [2:0] col_in,
  output window_t    win
);

  // [0] = row above, [1] = current row, [2] = row below
  logic [2:0] col_l, col_m, col_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_l <= '0;
      col_m <= '0;
      col_r <= '0;
    end else if (clear) begin
      col_l <= '0;
      col_m <= '0;
      col_r <= '0;
    end else if (shift) begin
      col_l <= col_m;
      col_m <= col_r;
      col_r <= col_in;
    end
  end

  always_comb begin
    win.center = col_m[1];
    win.nb[1]  = col_l[2];
    win.nb[2]  = col_m[2];
    win.nb[3]  = col_r[2];
    win.nb[4]  = col_r[1];
    win.nb[5]  = col_r[0];
    win.nb[6]  = col_m[0];
    win.nb[7]  = col_l[0];
    win.nb[8]  = col_l[1];
  end

endmodule
