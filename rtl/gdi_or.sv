// gdi_or -- behavioural model of the N-input GDI OR cell (OR2, OR3, OR4).
//
// Kind: behavioural model of a transistor-level cell. Input a[0] is the
// common gate: when it is high the NMOS pulls the output to the '1' tied to
// its diffusion input; when it is low the PMOS devices pass the other inputs
// a[N-1:1] to the output. The model gives the cell's logic function, the OR
// of all N inputs, as ideal two-level logic without delay; the weak-high
// output level of a real GDI gate is not modelled. A 2-input cell is
// exactly one gdi_cell with n tied high, and is built that way here. The
// larger cells are written as the plain OR of their inputs, which is this
// design's reading of the multi-input cell. Combinational.
module gdi_or #(
  parameter int unsigned N = 2  // 2..4 in the cell library
) (
  input  logic [N-1:0] a,
  output logic         y
);

  logic rest;

  assign rest = |a[N-1:1];

  gdi_cell u_cell (.g(a[0]), .p(rest), .n(1'b1), .out(y));

endmodule
