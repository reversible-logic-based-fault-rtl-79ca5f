// ftra_ncv: the FTRA gate as a cascade of primitive quantum gates.
//
// Nine two-line gates act on the lines A..E, in this order:
//   1  CNOT  D -> C      C = C ^ D             } together one cost-1
//   2  CV    C -> D                            } CNOT/V pair
//   3  CV    B -> D
//   4  CV    A -> D      D has turned by A + B + (C ^ D) V steps
//   5  CNOT  B -> E
//   6  CNOT  A -> B      B = A ^ B        = Q
//   7  CNOT  B -> C      C = A^B^C^D      = R
//   8  CV+   C -> D      D = D ^ maj(A, B, C ^ D) = S
//   9  CNOT  D -> E      E = E ^ B ^ S    = T
// Steps 2 to 4 and 8 turn D by (A + B + (C^D)) - (A^B^C^D) quarter turns,
// which is twice maj(A, B, C^D), so D always ends in a basis state.  Counting
// the first pair as one, the quantum cost is 8.  The gate order follows the
// published quantum circuit of the FTRA.  Inputs and outputs are Boolean;
// `classical` is 1 when every control was Boolean at its gate and every
// output line ended Boolean, which holds for every input.  Combinational.
module ftra_ncv
  import ncv_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t,
  output logic classical
);

  // Line values between gates: <line>_<number of gates applied to it>.
  ncv_t a0, b0, c0, d0, e0;
  ncv_t c1, d1, d2, d3, d4, e1, b1, c2, d5, e2;
  ncv_t a1, a2, b2, b3, c3, c4, d6, q_line;
  logic [8:0] ok;

  always_comb begin
    a0 = ncv_from_bit(a);
    b0 = ncv_from_bit(b);
    c0 = ncv_from_bit(c);
    d0 = ncv_from_bit(d);
    e0 = ncv_from_bit(e);
  end

  ncv_gate #(.OP(NCV_CNOT))  g1 (.ctrl_i(d0), .tgt_i(c0), .ctrl_o(d1), .tgt_o(c1), .ctrl_ok(ok[0]));
  ncv_gate #(.OP(NCV_CV))    g2 (.ctrl_i(c1), .tgt_i(d1), .ctrl_o(c2), .tgt_o(d2), .ctrl_ok(ok[1]));
  ncv_gate #(.OP(NCV_CV))    g3 (.ctrl_i(b0), .tgt_i(d2), .ctrl_o(b1), .tgt_o(d3), .ctrl_ok(ok[2]));
  ncv_gate #(.OP(NCV_CV))    g4 (.ctrl_i(a0), .tgt_i(d3), .ctrl_o(a1), .tgt_o(d4), .ctrl_ok(ok[3]));
  ncv_gate #(.OP(NCV_CNOT))  g5 (.ctrl_i(b1), .tgt_i(e0), .ctrl_o(b2), .tgt_o(e1), .ctrl_ok(ok[4]));
  ncv_gate #(.OP(NCV_CNOT))  g6 (.ctrl_i(a1), .tgt_i(b2), .ctrl_o(a2), .tgt_o(b3), .ctrl_ok(ok[5]));
  ncv_gate #(.OP(NCV_CNOT))  g7 (.ctrl_i(b3), .tgt_i(c2), .ctrl_o(q_line), .tgt_o(c3), .ctrl_ok(ok[6]));
  ncv_gate #(.OP(NCV_CVDAG)) g8 (.ctrl_i(c3), .tgt_i(d4), .ctrl_o(c4), .tgt_o(d5), .ctrl_ok(ok[7]));
  ncv_gate #(.OP(NCV_CNOT))  g9 (.ctrl_i(d5), .tgt_i(e1), .ctrl_o(d6), .tgt_o(e2), .ctrl_ok(ok[8]));

  always_comb begin
    p = ncv_to_bit(a2);
    q = ncv_to_bit(q_line);
    r = ncv_to_bit(c4);
    s = ncv_to_bit(d6);
    t = ncv_to_bit(e2);
    classical = (&ok) & ncv_is_bool(a2) & ncv_is_bool(q_line) & ncv_is_bool(c4)
              & ncv_is_bool(d6) & ncv_is_bool(e2);
  end

endmodule
