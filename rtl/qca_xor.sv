// qca_xor: two-input exclusive OR built from three QCA majority voters.
//
//   y = MV( MV(x, ~z, 0), MV(~x, z, 0), 1 ) = x z' + x' z
//
// The two inner voters have one input fixed at P = -1 and act as AND gates,
// the outer voter has one input fixed at P = +1 and acts as an OR gate; two
// QCA inverters supply the complements.  This is the group of three voters
// that recurs throughout the QCA layout of the FTRA.  Purely combinational.
module qca_xor (
  input  logic x,
  input  logic z,
  output logic y
);

  logic and_l, and_r;

  qca_maj u_and_l (.a(x),  .b(~z), .c(1'b0), .y(and_l));
  qca_maj u_and_r (.a(~x), .b(z),  .c(1'b0), .y(and_r));
  qca_maj u_or    (.a(and_l), .b(and_r), .c(1'b1), .y(y));

endmodule
