// we_pkg: types and constants shared by the calculator-processor design.
//
// Holds the 4-bit ALU opcode encoding and the state types of the two
// controllers. Only the two multiply opcodes (0100 and 0101) come from the
// processor's state diagram, which routes exactly those two codes through the
// extra product-capture state; every other code assignment is this design's
// own choice. State names S1..S7 follow the state diagrams; the UART
// controller's final "Done" state has no name there and is called S4 here.
package we_pkg;

  typedef enum logic [3:0] {
    OP_ADD   = 4'b0000,  // A + B
    OP_SUB   = 4'b0001,  // A - B
    OP_SHL   = 4'b0010,  // A << B[2:0]
    OP_SHR   = 4'b0011,  // A >> B[2:0]
    OP_MULLO = 4'b0100,  // low byte of A * B   (multiply path)
    OP_MULHI = 4'b0101,  // high byte of A * B  (multiply path)
    OP_AND   = 4'b0110,
    OP_OR    = 4'b0111,
    OP_XOR   = 4'b1000,
    OP_NAND  = 4'b1001,
    OP_NOR   = 4'b1010,
    OP_XNOR  = 4'b1011,
    OP_NOTA  = 4'b1100,  // ~A
    OP_LT    = 4'b1101,  // 1 if A < B (unsigned), else 0
    OP_EQ    = 4'b1110,  // 1 if A == B, else 0
    OP_PASSA = 4'b1111   // A
  } alu_op_e;

  // True for the opcodes that take the multiplier path (extra EU cycle).
  function automatic logic is_mul(input logic [3:0] op);
    return (op == OP_MULLO) || (op == OP_MULHI);
  endfunction

  typedef enum logic [1:0] {
    U_S1,  // arm the receiver (ER)
    U_S2,  // wait for a received byte
    U_S3,  // advance the byte counter until it selects RA or RB
    U_S4   // Done
  } uart_state_e;

  typedef enum logic [2:0] {
    P_S1,   // idle, wait for E
    P_S2,   // SM = 00, load R with RA
    P_S3,   // settle
    P_S4A,  // SM = 01, EALU: ALU captures R, RB and the opcode
    P_S4B,  // EU: capture the product (multiply opcodes only)
    P_S5,   // SM = 10
    P_S6,   // Eout: load the ALU OUT register
    P_S7    // Done, load the display register
  } proc_state_e;

endpackage
