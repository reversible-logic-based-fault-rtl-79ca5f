// ft_csa: 4-bit fault-tolerant reversible carry-skip adder.
//
// Four FTRA full adders form a ripple chain.  Each FTRA's Q output, A ^ B, is
// that bit's propagate signal.  Three Fredkin gates with a 0 constant AND the
// propagates pairwise and then together into the group propagate P.  A
// Feynman double gate copies cin: one copy enters the first adder, the other
// the final Fredkin gate, which acts as a multiplexer with P as its control:
// cout = P ? cin : (ripple carry of the last adder).  When every bit
// propagates, the carry out is taken straight from cin and skips the chain.
// All gates are reversible and parity preserving; the circuit follows the
// published 4-bit layout, with one skip group.  Purely combinational.
module ft_csa (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  input  logic        cin,
  output logic [3:0]  sum,
  output logic        cout,
  output logic        skip,      // group propagate: cout came from cin
  output logic [16:0] garbage
);

  logic [4:0] carry;
  logic [3:0] prop;
  logic       cin_mux;
  logic       p01, p23;

  // Fan-out of cin through a Feynman double gate.
  f2g u_fanout (
    .a(cin), .b(1'b0), .c(1'b0),
    .p(carry[0]), .q(garbage[0]), .r(cin_mux)
  );

  for (genvar i = 0; i < 4; i++) begin : g_stage
    ftra u_ftra (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0), .e(1'b0),
      .p(garbage[1+2*i]), .q(prop[i]), .r(sum[i]), .s(carry[i+1]),
      .t(garbage[2+2*i])
    );
  end

  // Group propagate: Fredkin gates with C = 0 give R = A & B.
  frg u_and01 (.a(prop[0]), .b(prop[1]), .c(1'b0),
               .p(garbage[9]),  .q(garbage[10]), .r(p01));
  frg u_and23 (.a(prop[2]), .b(prop[3]), .c(1'b0),
               .p(garbage[11]), .q(garbage[12]), .r(p23));
  frg u_and03 (.a(p01), .b(p23), .c(1'b0),
               .p(garbage[13]), .q(garbage[14]), .r(skip));

  // Skip multiplexer: Q = P ? cin : ripple carry.
  frg u_skip (.a(skip), .b(carry[4]), .c(cin_mux),
              .p(garbage[15]), .q(cout), .r(garbage[16]));

endmodule
