// tb_ncv_gate: exhaustive check of the three primitive quantum gates on the
// four-state line encoding.  For every Boolean control and every target
// state, the target must follow the unitary's action, worked out here as a
// table: V applied twice equals NOT, V then V+ is the identity, and CNOT
// flips |0> and |1> and swaps V|0> with V|1>.  A control at |0> leaves the
// target alone.  ctrl_ok must be 1 for Boolean controls and 0 otherwise.
module tb_ncv_gate;
  import ncv_pkg::*;

  ncv_t ctrl, tgt;
  ncv_t co [3], to [3];
  logic ok [3];
  int checks = 0, failures = 0;

  ncv_gate #(.OP(NCV_CNOT))  u_cnot (.ctrl_i(ctrl), .tgt_i(tgt), .ctrl_o(co[0]), .tgt_o(to[0]), .ctrl_ok(ok[0]));
  ncv_gate #(.OP(NCV_CV))    u_cv   (.ctrl_i(ctrl), .tgt_i(tgt), .ctrl_o(co[1]), .tgt_o(to[1]), .ctrl_ok(ok[1]));
  ncv_gate #(.OP(NCV_CVDAG)) u_cvd  (.ctrl_i(ctrl), .tgt_i(tgt), .ctrl_o(co[2]), .tgt_o(to[2]), .ctrl_ok(ok[2]));

  // Action of NOT, V and V+ on |0>, V|0>, |1>, V|1>.
  ncv_t act [3][4] = '{
    '{2'd2, 2'd3, 2'd0, 2'd1},   // NOT
    '{2'd1, 2'd2, 2'd3, 2'd0},   // V
    '{2'd3, 2'd0, 2'd1, 2'd2}    // V+
  };

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cb = 0; cb < 2; cb++) begin
      for (int tv = 0; tv < 4; tv++) begin
        ctrl = cb ? NCV_ONE : NCV_ZERO;
        tgt = 2'(tv);
        #10;
        for (int g = 0; g < 3; g++) begin
          ncv_t exp_t;
          exp_t = cb ? act[g][tv] : 2'(tv);
          checks++;
          if (to[g] !== exp_t || co[g] !== ctrl || ok[g] !== 1'b1) begin
            failures++;
            $display("FAIL gate %0d ctrl=%0d tgt=%0d -> %0d exp %0d", g, ctrl, tgt, to[g], exp_t);
          end
        end
      end
    end
    // Two V steps make a NOT; V then V+ is the identity.
    for (int tv = 0; tv < 4; tv++) begin
      checks++;
      if (act[1][act[1][tv]] !== act[0][tv] || act[2][act[1][tv]] !== 2'(tv)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
