// tb_ftra_ncv: the quantum-gate cascade of the FTRA must reproduce the
// FTRA truth table for all 32 inputs, and every line must stay in a basis
// state wherever it acts as a control and at the outputs.
module tb_ftra_ncv;
  import ftra_ref_pkg::*;

  logic [4:0] in_v, out_v;
  logic classical;
  int checks = 0, failures = 0;

  ftra_ncv dut (
    .a(in_v[4]), .b(in_v[3]), .c(in_v[2]), .d(in_v[1]), .e(in_v[0]),
    .p(out_v[4]), .q(out_v[3]), .r(out_v[2]), .s(out_v[1]), .t(out_v[0]),
    .classical(classical)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      in_v = 5'(i);
      #10;
      checks++;
      if (out_v !== ftra_ref(in_v)) begin
        failures++;
        $display("FAIL in=%05b out=%05b exp=%05b", in_v, out_v, ftra_ref(in_v));
      end
      checks++;
      if (classical !== 1'b1) begin
        failures++;
        $display("FAIL in=%05b: a line left the basis states", in_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
