// frg: Fredkin gate, a 3x3 conservative reversible gate (controlled swap).
//
//   P = A,  Q = A'B ^ AC,  R = A'C ^ AB
//
// B and C are swapped when A = 1.  With C = 0, R = A & B and Q = A' & B;
// with A as a select line, Q and R are the two 2:1 multiplexer outputs.
// The gate conserves the number of ones, so it preserves parity.  The
// mapping is the standard one for this gate.  Purely combinational.
module frg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end

endmodule
