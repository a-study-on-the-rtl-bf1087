// gdi_xor2 -- behavioural model of the 2-input GDI XOR cell (4 transistors).
//
// Kind: behavioural model of a transistor-level cell, built from two GDI
// base cells. The first is wired as an inverter (p = 1, n = 0) and makes /a.
// The second has b on its gate and a, /a on its diffusion inputs, so it
// passes a when b is low and /a when b is high: y = a XOR b.
// Ideal two-level logic, no delay. Combinational.
module gdi_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  logic a_n;

  gdi_cell u_inv (.g(a), .p(1'b1), .n(1'b0), .out(a_n));
  gdi_cell u_sel (.g(b), .p(a),    .n(a_n),  .out(y));

endmodule
