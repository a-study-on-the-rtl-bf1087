// zs_neighbor_count -- N(Pi), the number of black pixels among the eight
// neighbours P1..P8 of the window centre (a population count of 8 bits).
//
// Interface: nb[k] is neighbour Pk; count is 0..8. Purely combinational.
// The function is the algorithm's; the adder tree (two levels of pairwise
// sums) is this design's choice.
module zs_neighbor_count
  import zs_pkg::*;
(
  input  nb_t        nb,
  output logic [3:0] count
);

  logic [1:0] pair [4];
  logic [2:0] quad [2];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      pair[i] = {1'b0, nb[2*i+1]} + {1'b0, nb[2*i+2]};
    end
    quad[0] = {1'b0, pair[0]} + {1'b0, pair[1]};
    quad[1] = {1'b0, pair[2]} + {1'b0, pair[3]};
    count   = {1'b0, quad[0]} + {1'b0, quad[1]};
  end

endmodule
