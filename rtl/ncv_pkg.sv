// ncv_pkg: encoding of a quantum line for NCV (NOT, CNOT, controlled-V,
// controlled-V+) circuits whose control lines are always in a basis state.
//
// V is the square root of NOT.  A target line acted on by NOT, V and V+ under
// Boolean controls only ever holds one of four states, each a rotation of |0>
// by a whole number of V steps:
//   0 = |0>,  1 = V|0>,  2 = |1>,  3 = V|1> (= V+|0>)
// V adds 1, V+ subtracts 1 and NOT adds 2, all modulo 4, and the
// encoding is exact for such circuits.  A line is Boolean when its value is
// even (0 or 2); its logic value is then 1 for state 2.
package ncv_pkg;

  typedef logic [1:0] ncv_t;

  typedef enum logic [1:0] {
    NCV_CNOT  = 2'd0,  // controlled NOT:  target + 2
    NCV_CV    = 2'd1,  // controlled V:    target + 1
    NCV_CVDAG = 2'd2   // controlled V+:   target - 1
  } ncv_op_e;

  localparam ncv_t NCV_ZERO = 2'd0;
  localparam ncv_t NCV_ONE  = 2'd2;

  function automatic ncv_t ncv_from_bit(input logic b);
    return {b, 1'b0};
  endfunction

  function automatic logic ncv_is_bool(input ncv_t v);
    return (v == NCV_ZERO) || (v == NCV_ONE);
  endfunction

  function automatic logic ncv_to_bit(input ncv_t v);
    return v == NCV_ONE;
  endfunction

endpackage
