// zs_erase_logic -- the erase decision of one Zhang-Suen sub-iteration for
// the centre pixel of a 3x3 window.
//
// A pixel is only considered when it is black. It is erased when
//   1. 2 <= N(Pi) <= 6        (not an end point, not an interior point)
//   2. S(Pi) = 1              (erasing it does not split the skeleton)
// and, in the first sub-iteration,
//   3. P2 * P6 * P8 = 0
//   4. P4 * P6 * P8 = 0
// or, in the second sub-iteration,
//   3'. P2 * P4 * P8 = 0
//   4'. P2 * P4 * P6 = 0
// with the neighbour numbering of zs_pkg. These conditions are used exactly
// as the algorithm states them for this numbering.
//
// Interface: win (window), step (sub-iteration); erase is combinational.
module zs_erase_logic
  import zs_pkg::*;
(
  input  window_t  win,
  input  zs_step_e step,
  output logic     erase
);

  logic [3:0] n_black;
  logic [2:0] s_trans;
  logic       cond_n, cond_s, cond_3, cond_4;

  zs_neighbor_count   u_n (.nb(win.nb), .count(n_black));
  zs_transition_count u_s (.nb(win.nb), .count(s_trans));

  always_comb begin
    cond_n = (n_black >= 4'd2) && (n_black <= 4'd6);
    cond_s = (s_trans == 3'd1);
    if (step == ZS_STEP1) begin
      cond_3 = !(win.nb[2] && win.nb[6] && win.nb[8]);
      cond_4 = !(win.nb[4] && win.nb[6] && win.nb[8]);
    end else begin
      cond_3 = !(win.nb[2] && win.nb[4] && win.nb[8]);
      cond_4 = !(win.nb[2] && win.nb[4] && win.nb[6]);
    end
    erase = win.center && cond_n && cond_s && cond_3 && cond_4;
  end

endmodule
