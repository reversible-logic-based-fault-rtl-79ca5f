// ft_full_adder: fault-tolerant reversible full adder made of a single FTRA.
//
// The FTRA gets A, B, C (carry in) and two constant 0 inputs.  Output R is
// the sum and S the carry out; P, Q and T are garbage.  One gate, two
// constant inputs, three garbage outputs, as in the published circuit.
// Purely combinational.
module ft_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic       sum,
  output logic       cout,
  output logic [2:0] garbage   // {T, Q, P} of the FTRA
);

  ftra u_ftra (
    .a(a), .b(b), .c(c), .d(1'b0), .e(1'b0),
    .p(garbage[0]), .q(garbage[1]), .r(sum), .s(cout), .t(garbage[2])
  );

endmodule
