// rev_alu_pkg: operation codes shared by the reversible ALU and its testbenches.
//
// The ALU is steered by a 3-bit select, S2 S1 S0, that picks one of eight
// operations: addition, subtraction, multiplication and the logic functions
// AND, OR, NOT, XOR and NAND. The set of eight operations and the 3-bit select
// follow the design; the binary code given to each operation below is this
// implementation's own choice, as no encoding is defined for it.
package rev_alu_pkg;

  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,  // F = A + B + Cin,  Cout = carry out
    OP_SUB  = 3'b001,  // F = A - B - Cin,  Cout = borrow out
    OP_MUL  = 3'b010,  // {F_HI, F} = A * B
    OP_AND  = 3'b011,  // F = A & B
    OP_OR   = 3'b100,  // F = A | B
    OP_NOT  = 3'b101,  // F = ~A
    OP_XOR  = 3'b110,  // F = A ^ B
    OP_NAND = 3'b111   // F = ~(A & B)
  } alu_op_e;

  localparam int unsigned NUM_OPS = 8;

endpackage
