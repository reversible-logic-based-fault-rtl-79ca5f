// ft_qca_top: the fault-tolerant reversible circuits built on the FTRA gate.
//
// The N-bit reversible ALU (ft_alu, default 4 bits) is the main design.  Next
// to it stand the other FTRA applications, each with its own ports: the
// single-gate full adder and full subtractor, the 4-bit ripple carry adder,
// the 4-bit carry-skip adder, the clocked QCA majority-voter realisation of
// the FTRA gate, and the FTRA as a cascade of primitive quantum gates
// (CNOT, controlled-V, controlled-V+).  They share nothing but clk and rst_n, which only the QCA
// gate uses.  Every circuit except the QCA gate is combinational; the QCA
// gate's outputs follow its inputs by QCA_ZONES clock edges.  Garbage outputs
// are brought out so that parity can be checked at the primary outputs.
module ft_qca_top
  import ft_pkg::*;
#(
  parameter int unsigned ALU_N     = 4,
  parameter int unsigned RCA_N     = 4,
  parameter int unsigned QCA_ZONES = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // ALU
  input  logic [ALU_N-1:0]   alu_a,
  input  logic [ALU_N-1:0]   alu_b,
  input  logic               alu_cin,
  input  alu_ctrl_t          alu_ctrl,
  output logic [ALU_N-1:0]   alu_out,
  output logic               alu_cout,
  output alu_ctrl_t          alu_ctrl_out,
  output logic [5*ALU_N-1:0] alu_garbage,
  // full adder
  input  logic               fa_a,
  input  logic               fa_b,
  input  logic               fa_c,
  output logic               fa_sum,
  output logic               fa_cout,
  output logic [2:0]         fa_garbage,
  // full subtractor
  input  logic               fs_a,
  input  logic               fs_b,
  input  logic               fs_c,
  output logic               fs_diff,
  output logic               fs_bout,
  output logic [2:0]         fs_garbage,
  // ripple carry adder
  input  logic [RCA_N-1:0]   rca_a,
  input  logic [RCA_N-1:0]   rca_b,
  input  logic               rca_cin,
  output logic [RCA_N-1:0]   rca_sum,
  output logic               rca_cout,
  output logic [3*RCA_N-1:0] rca_garbage,
  // carry-skip adder
  input  logic [3:0]         csa_a,
  input  logic [3:0]         csa_b,
  input  logic               csa_cin,
  output logic [3:0]         csa_sum,
  output logic               csa_cout,
  output logic               csa_skip,
  output logic [16:0]        csa_garbage,
  // QCA FTRA gate: {A,B,C,D,E} in, {P,Q,R,S,T} out
  input  logic [4:0]         qca_in,
  output logic [4:0]         qca_out,
  // FTRA as a cascade of primitive quantum gates: {A,B,C,D,E} in, {P,Q,R,S,T} out
  input  logic [4:0]         ncv_in,
  output logic [4:0]         ncv_out,
  output logic               ncv_classical
);

  ft_alu #(.N(ALU_N)) u_alu (
    .a(alu_a), .b(alu_b), .cin(alu_cin), .ctrl(alu_ctrl),
    .out(alu_out), .cout(alu_cout), .ctrl_out(alu_ctrl_out),
    .garbage(alu_garbage)
  );

  ft_full_adder u_fa (
    .a(fa_a), .b(fa_b), .c(fa_c),
    .sum(fa_sum), .cout(fa_cout), .garbage(fa_garbage)
  );

  ft_full_subtractor u_fs (
    .a(fs_a), .b(fs_b), .c(fs_c),
    .diff(fs_diff), .bout(fs_bout), .garbage(fs_garbage)
  );

  ft_rca #(.N(RCA_N)) u_rca (
    .a(rca_a), .b(rca_b), .cin(rca_cin),
    .sum(rca_sum), .cout(rca_cout), .garbage(rca_garbage)
  );

  ft_csa u_csa (
    .a(csa_a), .b(csa_b), .cin(csa_cin),
    .sum(csa_sum), .cout(csa_cout), .skip(csa_skip), .garbage(csa_garbage)
  );

  ftra_qca #(.ZONES(QCA_ZONES)) u_qca (
    .clk(clk), .rst_n(rst_n),
    .a(qca_in[4]), .b(qca_in[3]), .c(qca_in[2]), .d(qca_in[1]), .e(qca_in[0]),
    .p(qca_out[4]), .q(qca_out[3]), .r(qca_out[2]), .s(qca_out[1]),
    .t(qca_out[0])
  );

  ftra_ncv u_ncv (
    .a(ncv_in[4]), .b(ncv_in[3]), .c(ncv_in[2]), .d(ncv_in[1]), .e(ncv_in[0]),
    .p(ncv_out[4]), .q(ncv_out[3]), .r(ncv_out[2]), .s(ncv_out[1]),
    .t(ncv_out[0]), .classical(ncv_classical)
  );

endmodule
