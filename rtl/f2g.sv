// f2g: Feynman double gate, a 3x3 parity-preserving reversible gate.
//
//   P = A,  Q = A ^ B,  R = A ^ C
//
// With B = C = 0 it makes two copies of A (reversible logic allows no
// fan-out); with A as a control constant it inverts B and C together.  The
// mapping is the standard one for this gate.  Purely combinational.
module f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end

endmodule
