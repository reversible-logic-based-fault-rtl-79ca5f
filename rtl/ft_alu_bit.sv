// ft_alu_bit: one slice of the fault-tolerant reversible ALU.
//
// Seven reversible gates: one FTRA, two Fredkin gates (FRG) and four Feynman
// double gates (F2G), with four constant inputs and five garbage outputs.
//   F2G(B,0,0)            three copies of B
//   F2G(C0,A,B)           C0, A^C0, B^C0     (C0 inverts both operands)
//   FRG(A^C0,B^C0,0)      A^C0, (A^C0)'(B^C0), (A^C0)(B^C0)
//   FTRA(Cin,B,A^C0,0,B)  R = Cin^B^A^C0,  S = maj(Cin,B,A^C0) = Cout/Bout
//   F2G(C0,R,T)           C0, R^C0 = A^B^Cin, garbage
//   F2G(C1,FRG.Q,FRG.R)   C1, garbage, C1 ^ (A^C0)(B^C0)
//   FRG(C2,sum,logic)     C2, garbage, Output = C2 ? sum : logic
// So C2 = 1 gives the sum/difference bit (C0 = 0 add with carry out,
// C0 = 1 subtract A - B - Cin with borrow out) and C2 = 0 gives AND, NAND,
// NOR, OR for C0 C1 = 00, 01, 10, 11.  The gate list and wiring follow the
// published slice; the function table is the one the wiring produces (the
// names C0 and C2 are exchanged in the published table).  The control lines
// leave their gates unchanged on ctrl_out, to feed the next slice.  Purely
// combinational.
module ft_alu_bit
  import ft_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  alu_ctrl_t  ctrl,
  output logic       out,
  output logic       cout,
  output alu_ctrl_t  ctrl_out,
  output logic [4:0] garbage
);

  logic b_ftra, b_e, b_f2g;
  logic c0_mid, a_x, b_x;
  logic a_x_fwd, and_n, and_p;
  logic r_sum, t_g;
  logic sum_bit, logic_bit;

  f2g u_bcopy (.a(b), .b(1'b0), .c(1'b0), .p(b_ftra), .q(b_e), .r(b_f2g));

  f2g u_inv   (.a(ctrl.c0), .b(a), .c(b_f2g), .p(c0_mid), .q(a_x), .r(b_x));

  frg u_and   (.a(a_x), .b(b_x), .c(1'b0), .p(a_x_fwd), .q(and_n), .r(and_p));

  ftra u_ftra (
    .a(cin), .b(b_ftra), .c(a_x_fwd), .d(1'b0), .e(b_e),
    .p(garbage[0]), .q(garbage[1]), .r(r_sum), .s(cout), .t(t_g)
  );

  f2g u_fix   (.a(c0_mid), .b(r_sum), .c(t_g),
               .p(ctrl_out.c0), .q(sum_bit), .r(garbage[2]));

  f2g u_lg    (.a(ctrl.c1), .b(and_n), .c(and_p),
               .p(ctrl_out.c1), .q(garbage[3]), .r(logic_bit));

  frg u_sel   (.a(ctrl.c2), .b(sum_bit), .c(logic_bit),
               .p(ctrl_out.c2), .q(garbage[4]), .r(out));

endmodule
