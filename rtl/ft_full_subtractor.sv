// ft_full_subtractor: the full-subtractor arrangement of one FTRA.
//
// The FTRA gets C, B, A on its first three inputs and 0 on D and E, as in the
// published circuit.  Output R is the difference bit A ^ B ^ C, which is the
// difference of A - B - C.  Output S, labelled the borrow out, is
// (C ^ B)A ^ CB, the majority of A, B and C: with the inputs in this order
// the gate gives the carry function, which equals the borrow of A - B - C
// only when the minuend line carries A' (the ALU slice obtains a true borrow
// that way, with a Feynman double gate inverting A).  The module keeps the
// published connections; `bout` is therefore maj(A, B, C).  Combinational.
module ft_full_subtractor (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic       diff,
  output logic       bout,
  output logic [2:0] garbage   // {T, Q, P} of the FTRA
);

  ftra u_ftra (
    .a(c), .b(b), .c(a), .d(1'b0), .e(1'b0),
    .p(garbage[0]), .q(garbage[1]), .r(diff), .s(bout), .t(garbage[2])
  );

endmodule
