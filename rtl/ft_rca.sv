// ft_rca: fault-tolerant reversible ripple carry adder built from FTRA gates.
//
// Stage i is an FTRA full adder with inputs A[i], B[i], the carry from stage
// i-1 (cin for stage 0) and 0 on D and E.  Its R output is sum[i] and its S
// output the carry into stage i+1; P, Q and T are garbage.  N = 4 as in the
// published 4-bit circuit.  Purely combinational; the carry ripples through N
// gates.
module ft_rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           cin,
  output logic [N-1:0]   sum,
  output logic           cout,
  output logic [3*N-1:0] garbage  // {T, Q, P} of stage i at [3i +: 3]
);

  logic [N:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    ftra u_ftra (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0), .e(1'b0),
      .p(garbage[3*i]), .q(garbage[3*i+1]), .r(sum[i]), .s(carry[i+1]),
      .t(garbage[3*i+2])
    );
  end

  assign cout = carry[N];

endmodule
