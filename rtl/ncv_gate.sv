// ncv_gate: one two-line primitive quantum gate (CNOT, controlled-V or
// controlled-V+) acting on lines in the ncv_pkg encoding.
//
// When the control line is |1> the target is rotated: by 2 (NOT) for
// NCV_CNOT, by +1 (V) for NCV_CV and by -1 (V+) for NCV_CVDAG.  With the
// control at |0> the target passes unchanged; the control always passes
// unchanged.  The encoding is exact only while controls are Boolean, so the
// gate reports ctrl_ok = 0 when its control is in a V state and an
// assertion flags that case in simulation.  Each gate has quantum cost 1.
// Purely combinational.
module ncv_gate
  import ncv_pkg::*;
#(
  parameter ncv_op_e OP = NCV_CNOT
) (
  input  ncv_t ctrl_i,
  input  ncv_t tgt_i,
  output ncv_t ctrl_o,
  output ncv_t tgt_o,
  output logic ctrl_ok
);

  ncv_t step;

  always_comb begin
    unique case (OP)
      NCV_CNOT:  step = 2'd2;
      NCV_CV:    step = 2'd1;
      default:   step = 2'd3;  // V+: minus one, modulo 4
    endcase
    ctrl_o  = ctrl_i;
    ctrl_ok = ncv_is_bool(ctrl_i);
    tgt_o   = ncv_to_bit(ctrl_i) ? tgt_i + step : tgt_i;
  end

  always_comb begin
    assert final (ncv_is_bool(ctrl_i))
      else $error("ncv_gate: control line in a non-Boolean state %0d", ctrl_i);
  end

endmodule
