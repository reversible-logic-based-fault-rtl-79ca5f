// tb_ftra_adder_sweep: the FTRA used as a full adder, with D and E held at 0
// and A, B, C counting through all eight combinations (C changing fastest),
// repeated twice.  Each combination is held for four clock zones (one full
// QCA clock cycle).  The three realisations are checked side by side: R must
// be the sum and S the carry of A + B + C, computed here with integer
// arithmetic.  The gate-equation and quantum-gate versions are checked at
// once, the QCA version 12 zones after the inputs were applied.
module tb_ftra_adder_sweep;
  localparam int ZONES = 12;
  localparam int HOLD = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic a, b, c;
  logic [4:0] o_eq, o_ncv, o_qca;
  logic classical;
  int checks = 0, failures = 0, cycle = 0;
  logic [2:0] hist [$];

  ftra u_eq (.a(a), .b(b), .c(c), .d(1'b0), .e(1'b0),
             .p(o_eq[4]), .q(o_eq[3]), .r(o_eq[2]), .s(o_eq[1]), .t(o_eq[0]));
  ftra_ncv u_ncv (.a(a), .b(b), .c(c), .d(1'b0), .e(1'b0),
                  .p(o_ncv[4]), .q(o_ncv[3]), .r(o_ncv[2]), .s(o_ncv[1]), .t(o_ncv[0]),
                  .classical(classical));
  ftra_qca #(.ZONES(ZONES)) u_qca (.clk(clk), .rst_n(rst_n),
                  .a(a), .b(b), .c(c), .d(1'b0), .e(1'b0),
                  .p(o_qca[4]), .q(o_qca[3]), .r(o_qca[2]), .s(o_qca[1]), .t(o_qca[0]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] add3(input logic [2:0] v);
    return 2'(int'(v[2]) + int'(v[1]) + int'(v[0]));
  endfunction

  initial begin
    {a, b, c} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 16 * HOLD + ZONES; i++) begin
      logic [2:0] v;
      v = 3'(i / HOLD);
      {a, b, c} = v;
      hist.push_back(v);
      #1;
      checks++;
      if ({o_eq[1], o_eq[2]} !== add3(v) || {o_ncv[1], o_ncv[2]} !== add3(v) || !classical) begin
        failures++;
        $display("FAIL abc=%03b eq S,R=%0b%0b ncv S,R=%0b%0b", v, o_eq[1], o_eq[2], o_ncv[1], o_ncv[2]);
      end
      @(posedge clk);
      #1;
      if (hist.size() >= ZONES) begin
        logic [2:0] old;
        old = hist.pop_front();
        checks++;
        if ({o_qca[1], o_qca[2]} !== add3(old)) begin
          failures++;
          $display("FAIL qca abc=%03b S,R=%0b%0b", old, o_qca[1], o_qca[2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
