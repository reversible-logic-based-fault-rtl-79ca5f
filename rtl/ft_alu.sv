// ft_alu: N-bit fault-tolerant reversible ALU, a cascade of ft_alu_bit slices.
//
// The carry/borrow out of slice i (its FTRA's S output) is the carry in of
// slice i+1.  The control constants C0, C1, C2 are not fanned out: they leave
// each slice on the pass-through outputs of the gates that use them and
// enter the next slice, as reversible logic requires.  Functions (see
// ft_pkg): AND, NAND, NOR, OR, ADD (A + B + cin, carry out) and SUB
// (A - B - cin, borrow out).  The cascade follows the published n-bit ALU;
// the default width N = 4 is this design's choice.  Purely combinational,
// with an N-gate ripple path.
module ft_alu
  import ft_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           cin,
  input  alu_ctrl_t      ctrl,
  output logic [N-1:0]   out,
  output logic           cout,
  output alu_ctrl_t      ctrl_out,
  output logic [5*N-1:0] garbage
);

  logic      [N:0] carry;
  alu_ctrl_t       ctl [N+1];

  assign carry[0] = cin;
  assign ctl[0]   = ctrl;

  for (genvar i = 0; i < N; i++) begin : g_slice
    ft_alu_bit u_slice (
      .a(a[i]), .b(b[i]), .cin(carry[i]), .ctrl(ctl[i]),
      .out(out[i]), .cout(carry[i+1]), .ctrl_out(ctl[i+1]),
      .garbage(garbage[5*i +: 5])
    );
  end

  assign cout     = carry[N];
  assign ctrl_out = ctl[N];

endmodule
