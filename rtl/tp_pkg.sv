// tp_pkg: shared types and constants of the Tiny Printed ISA (TP-ISA).
//
// A TP-ISA instruction is {opcode[3:0], ctl[3:0], operand1, operand2}. The
// standard format has two 8-bit operands (24-bit words); a program-specific
// core may narrow either operand. The four control bits are W (write the
// result back), C (use the carry flag), A (invert operand 2 / arithmetic
// variant / negate a branch condition) and B (marks a branch). The mnemonic
// set and field layout follow the published instruction table; the numeric
// opcode values are not published and are this design's own choice.
package tp_pkg;

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,   // ADD, ADC, SUB, SBB, CMP
    OP_AND   = 4'd1,   // AND, TEST
    OP_OR    = 4'd2,
    OP_XOR   = 4'd3,
    OP_NOT   = 4'd4,
    OP_RL    = 4'd5,   // RL, RLC
    OP_RR    = 4'd6,   // RR, RRC, RRA
    OP_STORE = 4'd7,   // memory[operand1] <= immediate
    OP_BAR   = 4'd8,   // BAR[operand1] <= immediate
    OP_BR    = 4'd9    // BR, BRN
  } opcode_e;

  // Control nibble, bit 19..16 of the 24-bit word.
  typedef struct packed {
    logic w;   // write result back to operand-1 address
    logic c;   // carry-in / rotate through carry
    logic a;   // invert operand 2 (SUB/SBB/CMP), arithmetic RR, negated branch
    logic b;   // branch-type instruction
  } ctl_t;

  // Flags register, bit 3..0: Sign, Zero, Carry out, oVerflow. The same order
  // is used for the 4-bit branch mask.
  typedef struct packed {
    logic s;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // ALU operation selected by the decoder.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_AND = 3'd1,
    ALU_OR  = 3'd2,
    ALU_XOR = 3'd3,
    ALU_NOT = 3'd4,
    ALU_RL  = 3'd5,
    ALU_RR  = 3'd6
  } alu_op_e;

endpackage
