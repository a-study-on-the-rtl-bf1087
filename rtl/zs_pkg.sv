// zs_pkg -- shared constants and types of the Zhang-Suen thinning processor.
//
// The default image size is 96 x 96 binary pixels, the fingerprint size the
// processor is built for. A pixel value of 1 is black (ridge), 0 is white.
//
// The 3x3 window follows the neighbour numbering of the algorithm: with the
// image drawn row 0 at the top,
//
//      P7 P6 P5
//      P8 Pc P4
//      P1 P2 P3
//
// so P1 starts at the lower left and the indices run counter-clockwise.
// window_t.nb[k] holds Pk (k = 1..8) and window_t.center holds Pc.
// Drawing row 0 at the top (P6 is the row above, P2 the row below) is this
// design's choice of image orientation.
package zs_pkg;

  parameter int unsigned IMG_W = 96;
  parameter int unsigned IMG_H = 96;

  // Neighbours P8..P1; bit k-1 of the vector is Pk.
  typedef logic [8:1] nb_t;

  typedef struct packed {
    nb_t  nb;      // P8..P1
    logic center;  // Pc
  } window_t;

  // The two sub-iterations of one thinning iteration.
  typedef enum logic {
    ZS_STEP1 = 1'b0,
    ZS_STEP2 = 1'b1
  } zs_step_e;

endpackage
