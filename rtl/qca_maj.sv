// qca_maj: QCA three-input majority voter, MV(A,B,C) = AB + BC + CA.
//
// The basic device of quantum-dot cellular automata.  Logic 0 stands for cell
// polarisation P = -1 and logic 1 for P = +1; fixing one input to 0 (P = -1)
// makes a two-input AND, fixing it to 1 (P = +1) a two-input OR.  Purely
// combinational; the clock zone that holds a device is modelled by the
// circuit that uses it.
module qca_maj (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (c & a);

endmodule
