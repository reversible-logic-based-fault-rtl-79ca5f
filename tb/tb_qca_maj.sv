// tb_qca_maj: exhaustive check of the majority voter against a count of ones,
// and of its use as AND (one input 0) and OR (one input 1).
module tb_qca_maj;
  logic [2:0] in_v;
  logic y;
  int checks = 0, failures = 0;

  qca_maj dut (.a(in_v[2]), .b(in_v[1]), .c(in_v[0]), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      in_v = 3'(i);
      #10;
      checks++;
      if (y !== ($countones(in_v) >= 2)) begin
        failures++;
        $display("FAIL in=%03b y=%0b", in_v, y);
      end
      checks++;
      if (in_v[0] == 1'b0 && y !== (in_v[2] & in_v[1])) failures++;
      if (in_v[0] == 1'b1 && y !== (in_v[2] | in_v[1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
