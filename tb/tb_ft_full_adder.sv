// tb_ft_full_adder: exhaustive check of the one-gate full adder against
// integer addition, and of parity between inputs and all outputs.
module tb_ft_full_adder;
  logic [2:0] in_v;
  logic sum, cout;
  logic [2:0] g;
  int checks = 0, failures = 0;

  ft_full_adder dut (.a(in_v[2]), .b(in_v[1]), .c(in_v[0]),
                     .sum(sum), .cout(cout), .garbage(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int total;
      in_v = 3'(i);
      #10;
      total = int'(in_v[2]) + int'(in_v[1]) + int'(in_v[0]);
      checks++;
      if ({cout, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL in=%03b sum=%0b cout=%0b", in_v, sum, cout);
      end
      checks++;
      if ((^in_v) != (sum ^ cout ^ (^g))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
