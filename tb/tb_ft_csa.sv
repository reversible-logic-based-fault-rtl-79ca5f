// tb_ft_csa: exhaustive check of the 4-bit carry-skip adder.  Sum and carry
// are compared with integer addition for all 512 operand/carry combinations,
// skip with "every bit propagates" (A ^ B all ones), and parity between the
// inputs and all outputs.  Both the skip path and the ripple path must be
// exercised with each value of cin.
module tb_ft_csa;
  logic [3:0] a, b, sum;
  logic cin, cout, skip;
  logic [16:0] g;
  int checks = 0, failures = 0;
  int skipped [2];
  int rippled = 0;

  ft_csa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .skip(skip), .garbage(g));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    skipped = '{0, 0};
    for (int i = 0; i < 512; i++) begin
      int total;
      {a, b, cin} = 9'(i);
      #10;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== 5'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got %0d", a, b, cin, {cout, sum});
      end
      checks++;
      if (skip !== ((a ^ b) == 4'hF)) failures++;
      checks++;
      if ((^{a, b, cin}) != (^{sum, cout, g})) failures++;
      if (skip) skipped[cin]++;
      else rippled++;
    end
    $display("skip taken: cin=0 %0d, cin=1 %0d; ripple %0d", skipped[0], skipped[1], rippled);
    checks++;
    if (skipped[0] != 16 || skipped[1] != 16 || rippled == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
