// tb_f2g: exhaustive check of the Feynman double gate: mapping, parity
// preservation and reversibility over all 8 input vectors.
module tb_f2g;
  logic [2:0] in_v, out_v, exp_v;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  f2g dut (.a(in_v[2]), .b(in_v[1]), .c(in_v[0]),
           .p(out_v[2]), .q(out_v[1]), .r(out_v[0]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      in_v = 3'(i);
      #10;
      // A copied; B and C inverted when A is 1.
      exp_v = in_v[2] ? {1'b1, ~in_v[1], ~in_v[0]} : in_v;
      checks++;
      if (out_v !== exp_v) begin
        failures++;
        $display("FAIL in=%03b out=%03b exp=%03b", in_v, out_v, exp_v);
      end
      checks++;
      if ((^in_v) != (^out_v)) failures++;
      seen[out_v] = 1'b1;
    end
    checks++;
    if (seen != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
