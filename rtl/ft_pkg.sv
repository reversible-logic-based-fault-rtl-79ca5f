// ft_pkg: types and constants shared by the fault-tolerant reversible ALU.
//
// The ALU slice is programmed by three constant inputs C0, C1 and C2 that
// enter reversible gates as control lines and leave them unchanged, so they
// travel from slice to slice like data.  The struct keeps the three together.
// Function encoding, as it follows from the gate wiring of the slice:
//   C2 = 1 : arithmetic, output = A ^ B ^ Cin; C0 = 0 add, C0 = 1 subtract
//   C2 = 0 : logic, output = C1 ^ ((A ^ C0) & (B ^ C0))
//            C0 C1 = 00 AND, 01 NAND, 10 NOR, 11 OR
package ft_pkg;

  typedef struct packed {
    logic c0;  // inverts A and B before the adder and the AND term
    logic c1;  // inverts the logic result
    logic c2;  // 1 selects the sum bit, 0 the logic result
  } alu_ctrl_t;

  localparam alu_ctrl_t ALU_AND  = '{c0: 1'b0, c1: 1'b0, c2: 1'b0};
  localparam alu_ctrl_t ALU_NAND = '{c0: 1'b0, c1: 1'b1, c2: 1'b0};
  localparam alu_ctrl_t ALU_NOR  = '{c0: 1'b1, c1: 1'b0, c2: 1'b0};
  localparam alu_ctrl_t ALU_OR   = '{c0: 1'b1, c1: 1'b1, c2: 1'b0};
  localparam alu_ctrl_t ALU_ADD  = '{c0: 1'b0, c1: 1'b0, c2: 1'b1};
  localparam alu_ctrl_t ALU_SUB  = '{c0: 1'b1, c1: 1'b0, c2: 1'b1};

endpackage
