// tb_ft_alu_bit: exhaustive check of one ALU slice.  For every operand/carry
// combination and every control code the output is compared with the
// function the code selects, the carry/borrow with integer arithmetic, the
// control outputs with the control inputs, and the parity of all outputs
// with the parity of all inputs.
module tb_ft_alu_bit;
  import ft_pkg::*;

  logic a, b, cin, out, cout;
  alu_ctrl_t ctrl, ctrl_out;
  logic [4:0] g;
  int checks = 0, failures = 0;

  ft_alu_bit dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl), .out(out), .cout(cout),
                  .ctrl_out(ctrl_out), .garbage(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 8; i++) begin
        logic exp_out, exp_c;
        int add, sub;
        ctrl = alu_ctrl_t'(k);
        {a, b, cin} = 3'(i);
        #10;
        add = int'(a) + int'(b) + int'(cin);
        sub = int'(a) - int'(b) - int'(cin);
        if (ctrl.c2) exp_out = add[0];
        else case ({ctrl.c0, ctrl.c1})
          2'b00: exp_out = a & b;
          2'b01: exp_out = ~(a & b);
          2'b10: exp_out = ~(a | b);
          default: exp_out = a | b;
        endcase
        exp_c = ctrl.c0 ? (sub < 0) : (add > 1);
        checks++;
        if (out !== exp_out) begin
          failures++;
          $display("FAIL out ctrl=%03b a=%0b b=%0b cin=%0b out=%0b", k, a, b, cin, out);
        end
        checks++;
        if (cout !== exp_c) begin
          failures++;
          $display("FAIL cout ctrl=%03b a=%0b b=%0b cin=%0b cout=%0b", k, a, b, cin, cout);
        end
        checks++;
        if (ctrl_out !== ctrl) failures++;
        checks++;
        if ((^{a, b, cin, ctrl}) != (^{out, cout, ctrl_out, g})) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
