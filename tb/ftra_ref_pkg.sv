// ftra_ref_pkg: reference values for checking FTRA-based circuits.
//
// ftra_ref() returns the expected {P,Q,R,S,T} of the FTRA gate for an input
// vector {A,B,C,D,E}.  R, S and T are read from the gate's truth table, held
// as one 32-bit column per output, bit i being the row whose inputs read i in
// binary (A is the most significant bit).  P = A and Q = A ^ B.  The helper
// functions give the parity and the number of ones of a vector.
package ftra_ref_pkg;

  localparam logic [31:0] COL_R = 32'h3CC3C33C;
  localparam logic [31:0] COL_S = 32'h33F0F0CC;
  localparam logic [31:0] COL_T = 32'h665AA566;

  function automatic logic [4:0] ftra_ref(input logic [4:0] abcde);
    logic a, b;
    a = abcde[4];
    b = abcde[3];
    return {a, a ^ b, COL_R[abcde], COL_S[abcde], COL_T[abcde]};
  endfunction

  function automatic int unsigned ones(input logic [31:0] v);
    int unsigned n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
