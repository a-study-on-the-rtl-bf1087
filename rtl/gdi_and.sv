// gdi_and -- behavioural model of the N-input GDI AND cell (AND2, AND3, AND4).
//
// Kind: behavioural model of a transistor-level cell. Input a[0] is the
// common gate: when it is low the PMOS pulls the output to the '0' tied to
// its diffusion input; when it is high the NMOS devices pass the other
// inputs a[N-1:1] to the output. The model gives the cell's logic function,
// the AND of all N inputs, as ideal two-level logic without delay; the
// weak-low output level of a real GDI gate is not modelled. A 2-input cell
// is exactly one gdi_cell with p tied low, and is built that way here. The
// larger cells are written as the plain AND of their inputs, which is this
// design's reading of the multi-input cell. Combinational.
module gdi_and #(
  parameter int unsigned N = 2  // 2..4 in the cell library
) (
  input  logic [N-1:0] a,
  output logic         y
);

  logic rest;

  assign rest = &a[N-1:1];

  gdi_cell u_cell (.g(a[0]), .p(1'b0), .n(rest), .out(y));

endmodule
