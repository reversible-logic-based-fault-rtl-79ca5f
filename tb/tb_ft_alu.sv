// tb_ft_alu: exhaustive check of the 4-bit ALU over all operands, both carry
// inputs and the six functions AND, NAND, NOR, OR, ADD and SUB.  Results and
// carry/borrow are compared with integer arithmetic and bitwise operators;
// the control outputs of the last slice must equal the control inputs, and
// the parity of all outputs must equal that of all inputs.  A second, 16-bit
// instance then gets 3000 random vectors to show that the width is a free
// parameter.
module tb_ft_alu;
  import ft_pkg::*;

  localparam int N = 4;
  logic [N-1:0] a, b, out;
  logic cin, cout;
  alu_ctrl_t ctrl, ctrl_out;
  logic [5*N-1:0] g;
  int checks = 0, failures = 0;
  alu_ctrl_t funcs [6];

  localparam int W = 16;
  logic [W-1:0] wa, wb, wout;
  logic wcin, wcout;
  alu_ctrl_t wctrl, wctrl_out;
  logic [5*W-1:0] wg;

  ft_alu #(.N(W)) dut_w (.a(wa), .b(wb), .cin(wcin), .ctrl(wctrl), .out(wout), .cout(wcout),
                         .ctrl_out(wctrl_out), .garbage(wg));

  ft_alu #(.N(N)) dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl), .out(out), .cout(cout),
                       .ctrl_out(ctrl_out), .garbage(g));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    funcs = '{ALU_AND, ALU_NAND, ALU_NOR, ALU_OR, ALU_ADD, ALU_SUB};
    for (int f = 0; f < 6; f++) begin
      for (int i = 0; i < (1 << (2*N+1)); i++) begin
        logic [N-1:0] exp_out;
        logic exp_c;
        int res;
        ctrl = funcs[f];
        {a, b, cin} = (2*N+1)'(i);
        #10;
        exp_c = cout;  // logic functions: carry output not checked
        case (f)
          0: exp_out = a & b;
          1: exp_out = ~(a & b);
          2: exp_out = ~(a | b);
          3: exp_out = a | b;
          4: begin
            res = int'(a) + int'(b) + int'(cin);
            exp_out = N'(res);
            exp_c = res >= (1 << N);
          end
          default: begin
            res = int'(a) - int'(b) - int'(cin);
            exp_out = N'(res);
            exp_c = res < 0;
          end
        endcase
        checks++;
        if (out !== exp_out || cout !== exp_c) begin
          failures++;
          $display("FAIL f=%0d a=%0d b=%0d cin=%0d out=%0d cout=%0b exp %0d %0b",
                   f, a, b, cin, out, cout, exp_out, exp_c);
        end
        checks++;
        if (ctrl_out !== ctrl) failures++;
        checks++;
        if ((^{a, b, cin, ctrl}) != (^{out, cout, ctrl_out, g})) failures++;
      end
    end
    for (int i = 0; i < 3000; i++) begin
      int f;
      longint res;
      logic [W-1:0] exp_out;
      logic exp_c;
      f = i % 6;
      wctrl = funcs[f];
      wa = W'($urandom);
      wb = W'($urandom);
      wcin = 1'($urandom);
      #10;
      exp_c = wcout;
      case (f)
        0: exp_out = wa & wb;
        1: exp_out = ~(wa & wb);
        2: exp_out = ~(wa | wb);
        3: exp_out = wa | wb;
        4: begin
          res = longint'(wa) + longint'(wb) + longint'(wcin);
          exp_out = W'(res);
          exp_c = res >= (longint'(1) << W);
        end
        default: begin
          res = longint'(wa) - longint'(wb) - longint'(wcin);
          exp_out = W'(res);
          exp_c = res < 0;
        end
      endcase
      checks++;
      if (wout !== exp_out || wcout !== exp_c || wctrl_out !== wctrl) begin
        failures++;
        $display("FAIL 16-bit f=%0d a=%0d b=%0d cin=%0d out=%0d cout=%0b", f, wa, wb, wcin, wout, wcout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
