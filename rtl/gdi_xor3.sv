// gdi_xor3 -- behavioural model of the 3-input GDI XOR cell (8 transistors).
//
// Kind: behavioural model of a transistor-level cell. It is written as two
// 2-input GDI XOR stages in series, y = (a XOR b) XOR c, which matches the
// cell's transistor count of twice the 2-input cell; the internal
// structure is this design's reading. Ideal two-level logic, no delay.
// Combinational.
module gdi_xor3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  logic ab;

  gdi_xor2 u_ab  (.a(a),  .b(b), .y(ab));
  gdi_xor2 u_abc (.a(ab), .b(c), .y(y));

endmodule
