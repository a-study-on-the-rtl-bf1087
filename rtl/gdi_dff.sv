// gdi_dff -- behavioural model of the 12-transistor GDI D flip-flop.
//
// Kind: behavioural model of a transistor-level cell. The flip-flop is a
// master latch and a slave latch, each a GDI multiplexer followed by a CMOS
// inverter, with a second inverter feeding the inverted output back to the
// multiplexer:
//   master: while ck = 0 the mux selects d, the node after the inverter is
//           /d; while ck = 1 the mux selects the feedback and holds.
//   slave:  while ck = 1 the mux selects the master's output, q = d as it
//           was at the rising edge; while ck = 0 it selects the feedback
//           and holds.
// So q takes d at the rising edge of ck. Because its output comes from a
// CMOS inverter, the cell gives full-swing levels. The two latches are
// written as level-sensitive always_latch blocks on purpose (this is the
// cell's structure), so synthesis and lint report two latches here. There
// is no reset, as in the cell. Ideal levels, no delay.
module gdi_dff (
  input  logic ck,
  input  logic d,
  output logic q
);

  logic master_n;  // master inverter output

  always_latch begin
    if (!ck) master_n = ~d;
  end

  always_latch begin
    if (ck) q = ~master_n;
  end

endmodule
