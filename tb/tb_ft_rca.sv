// tb_ft_rca: exhaustive check of the 4-bit FTRA ripple carry adder against
// integer addition (all 512 operand/carry combinations) and of parity between
// the inputs and all outputs, garbage included.
module tb_ft_rca;
  localparam int N = 4;
  logic [N-1:0] a, b, sum;
  logic cin, cout;
  logic [3*N-1:0] g;
  int checks = 0, failures = 0, carries = 0;

  ft_rca #(.N(N)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(g));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2*N+1)); i++) begin
      int total;
      {a, b, cin} = (2*N+1)'(i);
      #10;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== (N+1)'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got %0d", a, b, cin, {cout, sum});
      end
      checks++;
      if ((^{a, b, cin}) != (^{sum, cout, g})) failures++;
      if (cout) carries++;
    end
    checks++;
    if (carries == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
