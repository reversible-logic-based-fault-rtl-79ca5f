// tb_ft_full_subtractor: exhaustive check of the one-gate subtractor layout.
// diff must be the difference bit of A - B - C.  bout is the gate's S output,
// which with this input order is the majority of A, B and C; the check uses
// that definition, and also that it equals the true borrow of A - B - C
// whenever A is supplied complemented.  Parity is checked over all outputs.
module tb_ft_full_subtractor;
  logic [2:0] in_v;
  logic diff, bout;
  logic [2:0] g;
  int checks = 0, failures = 0;

  ft_full_subtractor dut (.a(in_v[2]), .b(in_v[1]), .c(in_v[0]),
                          .diff(diff), .bout(bout), .garbage(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int d, borrow_na;
      logic na;
      in_v = 3'(i);
      #10;
      d = int'(in_v[2]) - int'(in_v[1]) - int'(in_v[0]);
      checks++;
      if (diff !== d[0]) begin
        failures++;
        $display("FAIL diff in=%03b diff=%0b", in_v, diff);
      end
      checks++;
      if (bout !== ($countones(in_v) >= 2)) begin
        failures++;
        $display("FAIL bout in=%03b bout=%0b", in_v, bout);
      end
      // Borrow of X - B - C with X = ~A.
      na = ~in_v[2];
      borrow_na = (int'(na) - int'(in_v[1]) - int'(in_v[0])) < 0 ? 1 : 0;
      checks++;
      if (bout !== borrow_na[0]) begin
        failures++;
        $display("FAIL borrow of ~A-B-C in=%03b bout=%0b", in_v, bout);
      end
      checks++;
      if ((^in_v) != (diff ^ bout ^ (^g))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
