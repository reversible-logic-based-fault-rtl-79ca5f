// ftra_qca: QCA majority-voter implementation of the FTRA gate, clocked by
// clock zones.
//
// The gate is built from 27 majority voters (MV) and inverters only:
//   Q    = A ^ B                       3 MV
//   ab   = MV(A, B, 0)                 1 MV,  abd  = ab ^ D      3 MV
//   anb  = MV(A', B, 0)                1 MV,  anbd = anb ^ D     3 MV
//   cd   = C ^ D                       3 MV
//   prod = MV(Q, cd, 0)                1 MV,  R    = Q ^ cd      3 MV
//   S    = prod ^ abd                  3 MV
//   u    = prod ^ anbd                 3 MV,  T    = u ^ E       3 MV
// where every XOR is the three-voter group of qca_xor, and P is a wire from A.
// The grouping follows the published voter netlist of the layout.
//
// Timing: QCA moves data through four-phase clock zones.  One rising edge of
// clk stands for one zone.  The published layout has a delay of 12 zones
// with all five outputs arriving together; the voter network is evaluated in
// the first zone and the results travel through a ZONES-deep register chain,
// so the outputs {P,Q,R,S,T} seen at a clock edge belong to the inputs that
// were applied ZONES edges earlier.  A new input vector may be applied every
// edge.  The distribution of individual voters over the zones is this
// model's simplification.  rst_n (active low, synchronous) clears the chain.
module ftra_qca #(
  parameter int unsigned ZONES = 12
) (
  input  logic clk,
  input  logic rst_n,
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

  logic q_n, ab, abd, anb, anbd, cd, prod, r_n, s_n, u, t_n;

  qca_xor u_q    (.x(a), .z(b), .y(q_n));

  qca_maj u_ab   (.a(a), .b(b), .c(1'b0), .y(ab));
  qca_xor u_abd  (.x(ab), .z(d), .y(abd));

  qca_maj u_anb  (.a(~a), .b(b), .c(1'b0), .y(anb));
  qca_xor u_anbd (.x(anb), .z(d), .y(anbd));

  qca_xor u_cd   (.x(c), .z(d), .y(cd));

  qca_maj u_prod (.a(q_n), .b(cd), .c(1'b0), .y(prod));
  qca_xor u_r    (.x(q_n), .z(cd), .y(r_n));

  qca_xor u_s    (.x(prod), .z(abd), .y(s_n));

  qca_xor u_u    (.x(prod), .z(anbd), .y(u));
  qca_xor u_t    (.x(u), .z(e), .y(t_n));

  // Clock-zone chain; zone[0] holds the freshly evaluated outputs.
  logic [4:0] zone [ZONES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ZONES; i++) zone[i] <= '0;
    end else begin
      zone[0] <= {a, q_n, r_n, s_n, t_n};
      for (int i = 1; i < ZONES; i++) zone[i] <= zone[i-1];
    end
  end

  assign {p, q, r, s, t} = zone[ZONES-1];

endmodule
