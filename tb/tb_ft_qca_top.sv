// tb_ft_qca_top: end-to-end test of the whole design at its default sizes.
//
// Every clock cycle new random operands are applied to all circuits at once:
// the 4-bit ALU (cycling through AND, NAND, NOR, OR, ADD, SUB), the full
// adder, the full subtractor, the ripple carry and carry-skip adders, the
// quantum-gate FTRA and the clocked QCA FTRA.  Adder and ALU results are
// compared with integer arithmetic, the quantum-gate FTRA with the FTRA
// truth table, and the QCA gate's outputs with the same table 12 clocks
// after their inputs.  Each reversible circuit must also keep the
// parity of its outputs equal to that of its inputs.  The test counts how
// often each mechanism occurred (each ALU function, carry and borrow out, a
// carry rippling through all ALU slices, a skipped and a rippled carry in the
// carry-skip adder, a QCA vector passing through all 12 zones) and fails if
// any never did.  Directed vectors at the start make the rare ones certain.
module tb_ft_qca_top;
  import ft_pkg::*;
  import ftra_ref_pkg::*;

  localparam int N = 4;      // default ALU_N and RCA_N
  localparam int ZONES = 12; // default QCA_ZONES
  localparam int CYCLES = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] alu_a, alu_b, alu_out;
  logic alu_cin, alu_cout;
  alu_ctrl_t alu_ctrl, alu_ctrl_out;
  logic [5*N-1:0] alu_g;
  logic fa_a, fa_b, fa_c, fa_sum, fa_cout;
  logic [2:0] fa_g;
  logic fs_a, fs_b, fs_c, fs_diff, fs_bout;
  logic [2:0] fs_g;
  logic [N-1:0] rca_a, rca_b, rca_sum;
  logic rca_cin, rca_cout;
  logic [3*N-1:0] rca_g;
  logic [3:0] csa_a, csa_b, csa_sum;
  logic csa_cin, csa_cout, csa_skip;
  logic [16:0] csa_g;
  logic [4:0] qca_in, qca_out;
  logic [4:0] ncv_in, ncv_out;
  logic ncv_classical;

  ft_qca_top dut (
    .clk(clk), .rst_n(rst_n),
    .alu_a(alu_a), .alu_b(alu_b), .alu_cin(alu_cin), .alu_ctrl(alu_ctrl),
    .alu_out(alu_out), .alu_cout(alu_cout), .alu_ctrl_out(alu_ctrl_out),
    .alu_garbage(alu_g),
    .fa_a(fa_a), .fa_b(fa_b), .fa_c(fa_c), .fa_sum(fa_sum), .fa_cout(fa_cout),
    .fa_garbage(fa_g),
    .fs_a(fs_a), .fs_b(fs_b), .fs_c(fs_c), .fs_diff(fs_diff), .fs_bout(fs_bout),
    .fs_garbage(fs_g),
    .rca_a(rca_a), .rca_b(rca_b), .rca_cin(rca_cin), .rca_sum(rca_sum),
    .rca_cout(rca_cout), .rca_garbage(rca_g),
    .csa_a(csa_a), .csa_b(csa_b), .csa_cin(csa_cin), .csa_sum(csa_sum),
    .csa_cout(csa_cout), .csa_skip(csa_skip), .csa_garbage(csa_g),
    .qca_in(qca_in), .qca_out(qca_out),
    .ncv_in(ncv_in), .ncv_out(ncv_out), .ncv_classical(ncv_classical)
  );

  int checks = 0, failures = 0, cycle = 0;

  typedef enum int {
    EV_AND, EV_NAND, EV_NOR, EV_OR, EV_ADD, EV_SUB, EV_CARRY, EV_BORROW,
    EV_FULL_RIPPLE, EV_CSA_SKIP, EV_CSA_RIPPLE, EV_RCA_CARRY, EV_FA_CARRY,
    EV_QCA_THROUGH, EV_NCV, EV_COUNT
  } event_e;
  int events [EV_COUNT];
  string ev_name [EV_COUNT] = '{"alu AND", "alu NAND", "alu NOR", "alu OR",
    "alu ADD", "alu SUB", "alu carry out", "alu borrow out",
    "alu carry through all slices", "csa carry skipped", "csa carry rippled",
    "rca carry out", "full adder carry", "qca vector through all zones",
    "quantum-gate FTRA vector"};

  alu_ctrl_t funcs [6] = '{ALU_AND, ALU_NAND, ALU_NOR, ALU_OR, ALU_ADD, ALU_SUB};
  logic [4:0] qca_hist [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == CYCLES + 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Apply one set of stimuli; f selects the ALU function.
  task automatic apply(input int f, input logic [N-1:0] a, input logic [N-1:0] b,
                       input logic ci, input logic [3:0] ca, input logic [3:0] cb);
    alu_ctrl = funcs[f];
    alu_a = a; alu_b = b; alu_cin = ci;
    {fa_a, fa_b, fa_c} = 3'($urandom);
    {fs_a, fs_b, fs_c} = 3'($urandom);
    rca_a = N'($urandom); rca_b = N'($urandom); rca_cin = 1'($urandom);
    csa_a = ca; csa_b = cb; csa_cin = 1'($urandom);
    qca_in = 5'($urandom);
    ncv_in = 5'($urandom);
  endtask

  task automatic check_comb(input int f);
    int res;
    logic [N-1:0] exp_out;
    // ALU
    case (f)
      0: exp_out = alu_a & alu_b;
      1: exp_out = ~(alu_a & alu_b);
      2: exp_out = ~(alu_a | alu_b);
      3: exp_out = alu_a | alu_b;
      4: res = int'(alu_a) + int'(alu_b) + int'(alu_cin);
      default: res = int'(alu_a) - int'(alu_b) - int'(alu_cin);
    endcase
    if (f >= 4) exp_out = N'(res);
    check(alu_out == exp_out, $sformatf("alu f=%0d a=%0d b=%0d out=%0d", f, alu_a, alu_b, alu_out));
    if (f == 4) check(alu_cout == (res >= (1 << N)), "alu carry");
    if (f == 5) check(alu_cout == (res < 0), "alu borrow");
    check(alu_ctrl_out == alu_ctrl, "alu control pass-through");
    check((^{alu_a, alu_b, alu_cin, alu_ctrl}) == (^{alu_out, alu_cout, alu_ctrl_out, alu_g}),
          "alu parity");
    events[f]++;
    if (f == 4 && alu_cout) events[EV_CARRY]++;
    if (f == 5 && alu_cout) events[EV_BORROW]++;
    if (f == 4 && (alu_a ^ alu_b) == '1 && alu_cin) events[EV_FULL_RIPPLE]++;
    // Full adder and subtractor
    res = int'(fa_a) + int'(fa_b) + int'(fa_c);
    check({fa_cout, fa_sum} == 2'(res), "full adder");
    check((fa_a ^ fa_b ^ fa_c) == (fa_sum ^ fa_cout ^ (^fa_g)), "full adder parity");
    if (fa_cout) events[EV_FA_CARRY]++;
    check(fs_diff == (fs_a ^ fs_b ^ fs_c), "subtractor difference");
    check(fs_bout == ((fs_a & fs_b) | (fs_b & fs_c) | (fs_a & fs_c)), "subtractor S output");
    // Ripple carry adder
    res = int'(rca_a) + int'(rca_b) + int'(rca_cin);
    check({rca_cout, rca_sum} == (N+1)'(res), "rca sum");
    check((^{rca_a, rca_b, rca_cin}) == (^{rca_sum, rca_cout, rca_g}), "rca parity");
    if (rca_cout) events[EV_RCA_CARRY]++;
    // Carry-skip adder
    res = int'(csa_a) + int'(csa_b) + int'(csa_cin);
    check({csa_cout, csa_sum} == 5'(res), "csa sum");
    check(csa_skip == ((csa_a ^ csa_b) == 4'hF), "csa skip");
    check((^{csa_a, csa_b, csa_cin}) == (^{csa_sum, csa_cout, csa_g}), "csa parity");
    if (csa_skip) events[EV_CSA_SKIP]++;
    else events[EV_CSA_RIPPLE]++;
    // Quantum-gate FTRA
    check(ncv_out == ftra_ref(ncv_in) && ncv_classical, "quantum-gate FTRA");
    events[EV_NCV]++;
  endtask

  initial begin
    foreach (events[i]) events[i] = 0;
    apply(0, '0, '0, 1'b0, '0, '0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < CYCLES; i++) begin
      int f;
      f = i % 6;
      if (i < 12) begin
        // Directed: full carry/borrow ripple through the ALU, forced skip.
        apply(f, 4'b1010, 4'b0101, 1'b1, 4'b1100, 4'b0011);
      end else begin
        apply(f, N'($urandom), N'($urandom), 1'($urandom), 4'($urandom), 4'($urandom));
      end
      qca_hist.push_back(qca_in);
      #1;
      check_comb(f);
      @(posedge clk);
      #1;
      if (qca_hist.size() >= ZONES) begin
        logic [4:0] old;
        old = qca_hist.pop_front();
        check(qca_out == ftra_ref(old), $sformatf("qca in=%05b out=%05b", old, qca_out));
        check((^old) == (^qca_out), "qca parity");
        events[EV_QCA_THROUGH]++;
      end
    end
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("%-32s %0d", ev_name[e], events[e]);
      check(events[e] > 0, {"mechanism never occurred: ", ev_name[e]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
