// gdi_cell -- behavioural model of the gate-diffusion-input (GDI) base cell.
//
// Kind: behavioural model of a transistor-level cell (one PMOS and one NMOS
// whose sources are inputs). The gate input g drives both transistors; the
// PMOS passes its diffusion input p to the output when g is low and the NMOS
// passes its diffusion input n when g is high, so the logic function is a
// 2:1 multiplexer, out = g ? n : p. Tying the inputs gives the other
// primitive functions of the cell:
//   g=A, p=B,  n=1  ->  A + B   (OR)
//   g=A, p=0,  n=B  ->  A * B   (AND)
//   g=A, p=B,  n=C  ->  /A*B + A*C (MUX)
//   g=A, p=1,  n=0  ->  /A      (NOT)
// This version has its bulk terminals on the supply rails (p-substrate,
// n-well), so it fits a normal single-well standard-cell row.
// What the model leaves out: a real GDI output does not swing fully; when
// a threshold-drop path is active it only reaches VTN ("weak low") or
// VDD - VTP ("weak high"). That is why, in a hybrid GDI netlist, a GDI
// output should drive a full-swing CMOS cell. The model is ideal two-level
// logic with no delay. Interface and timing: combinational, ports as
// the cell's G, P, N and OUT pins.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic out
);

  assign out = g ? n : p;

endmodule
