// tb_frg: exhaustive check of the Fredkin gate: controlled swap, conservation
// of the number of ones, and reversibility over all 8 input vectors.
module tb_frg;
  logic [2:0] in_v, out_v, exp_v;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  frg dut (.a(in_v[2]), .b(in_v[1]), .c(in_v[0]),
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
      exp_v = in_v[2] ? {1'b1, in_v[0], in_v[1]} : in_v;
      checks++;
      if (out_v !== exp_v) begin
        failures++;
        $display("FAIL in=%03b out=%03b exp=%03b", in_v, out_v, exp_v);
      end
      checks++;
      if ($countones(in_v) != $countones(out_v)) failures++;
      seen[out_v] = 1'b1;
    end
    checks++;
    if (seen != '1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
