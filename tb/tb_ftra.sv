// tb_ftra: exhaustive check of the FTRA gate.
//
// All 32 input vectors are applied.  Each output vector is compared with the
// gate's truth table; the test also checks that parity is preserved and that
// no two inputs give the same output (the gate is reversible).
module tb_ftra;
  import ftra_ref_pkg::*;

  logic [4:0] in_v;
  logic [4:0] out_v;
  int checks = 0, failures = 0;
  logic [31:0] seen;

  ftra dut (
    .a(in_v[4]), .b(in_v[3]), .c(in_v[2]), .d(in_v[1]), .e(in_v[0]),
    .p(out_v[4]), .q(out_v[3]), .r(out_v[2]), .s(out_v[1]), .t(out_v[0])
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 32; i++) begin
      in_v = 5'(i);
      #10;
      checks++;
      if (out_v !== ftra_ref(in_v)) begin
        failures++;
        $display("FAIL in=%05b out=%05b exp=%05b", in_v, out_v, ftra_ref(in_v));
      end
      checks++;
      if ((^in_v) != (^out_v)) begin
        failures++;
        $display("FAIL parity in=%05b out=%05b", in_v, out_v);
      end
      seen[out_v] = 1'b1;
    end
    checks++;
    if (seen != '1) begin
      failures++;
      $display("FAIL not reversible, outputs seen %h", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
