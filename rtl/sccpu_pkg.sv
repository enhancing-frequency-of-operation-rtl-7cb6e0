// sccpu_pkg: shared constants and types for the single-cycle MIPS32-subset CPU.
//
// Holds the instruction field opcodes and function codes of the supported
// instructions, the ALU operation code carried on the 4-bit aluc bus, and the
// 2-bit selector of the next-PC multiplexer. The opcode and funct values are
// the standard MIPS32 encodings. The numeric ALU codes are this design's own
// choice; only the 4-bit width of aluc comes from the description of the ALU.
package sccpu_pkg;

  // Primary opcodes, instruction bits [31:26].
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_J     = 6'b000010,
    OP_JAL   = 6'b000011,
    OP_BEQ   = 6'b000100,
    OP_BNE   = 6'b000101,
    OP_ADDI  = 6'b001000,
    OP_ORI   = 6'b001101,
    OP_LUI   = 6'b001111,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  // Function codes of R-type instructions, bits [5:0].
  typedef enum logic [5:0] {
    FN_SLL = 6'b000000,
    FN_JR  = 6'b001000,
    FN_ADD = 6'b100000,
    FN_SUB = 6'b100010,
    FN_AND = 6'b100100,
    FN_OR  = 6'b100101
  } funct_e;

  // ALU operations on the 4-bit aluc control.
  typedef enum logic [3:0] {
    ALU_ADD = 4'd0,
    ALU_SUB = 4'd1,
    ALU_AND = 4'd2,
    ALU_OR  = 4'd3,
    ALU_SLL = 4'd4,  // b shifted left by a[4:0]
    ALU_LUI = 4'd5   // b[15:0] placed in the upper half
  } aluc_e;

  // Next-PC selection, in the input order of the 4:1 PC multiplexer.
  typedef enum logic [1:0] {
    PC_PLUS4  = 2'd0,
    PC_BRANCH = 2'd1,
    PC_REG    = 2'd2,
    PC_JUMP   = 2'd3
  } pcsrc_e;

endpackage
