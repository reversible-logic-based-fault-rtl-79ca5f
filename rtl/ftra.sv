// ftra: fault-tolerant reversible adder gate (FTRA), a 5x5 reversible gate.
//
//   P = A
//   Q = A ^ B
//   R = A ^ B ^ C ^ D
//   S = (A ^ B)(C ^ D) ^ (A B ^ D)
//   T = (A ^ B)(C ^ D) ^ (A'B ^ D) ^ E
//
// The mapping is a bijection on the 32 input vectors and preserves parity
// (A^B^C^D^E == P^Q^R^S^T), so a single wrong signal anywhere in a circuit
// built from such gates shows up as a parity error at its outputs.  With
// D = E = 0 the gate is a full adder: R is the sum and S the carry.  The
// equations are the gate's published mapping; in a quantum realisation it
// costs 8 primitive gates (CNOT, controlled-V, controlled-V+), which are not
// Boolean and are therefore not modelled one by one.  Purely combinational.
module ftra (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);

  logic ab_x, cd_x, both;

  always_comb begin
    ab_x = a ^ b;
    cd_x = c ^ d;
    both = ab_x & cd_x;
    p    = a;
    q    = ab_x;
    r    = ab_x ^ cd_x;
    s    = both ^ ((a & b) ^ d);
    t    = both ^ ((~a & b) ^ d) ^ e;
  end

endmodule
