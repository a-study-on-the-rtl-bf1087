// zs_transition_count -- S(Pi), the number of black-to-white (1 -> 0)
// changes met when walking once around the eight neighbours in the order
// P1, P2, ..., P8 and back to P1.
//
// Interface: nb[k] is neighbour Pk; count is 0..4. Purely combinational.
// A pixel with S = 1 lies on the edge of a single connected black region;
// S > 1 marks a pixel that joins several branches and must not be erased.
module zs_transition_count
  import zs_pkg::*;
(
  input  nb_t        nb,
  output logic [2:0] count
);

  logic [8:1] fall;  // fall[k]: Pk is black and its successor is white

  always_comb begin
    for (int k = 1; k <= 8; k++) begin
      fall[k] = nb[k] & ~nb[(k % 8) + 1];
    end
    count = '0;
    for (int k = 1; k <= 8; k++) begin
      count = count + 3'(fall[k]);
    end
  end

endmodule
