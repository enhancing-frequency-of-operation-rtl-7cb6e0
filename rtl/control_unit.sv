// control_unit: instruction decoder of the single-cycle CPU.
//
// From the opcode op (bits 31:26), the function code func (bits 5:0) and the
// ALU zero flag z it produces, in the same cycle, every control signal named
// in the datapath figure:
//   wreg   write the register file          regrt  destination is rt (else rd)
//   jal    destination r31, data PC+4       m2reg  write-back from data memory
//   shift  ALU a-input is the shift amount  aluimm ALU b-input is the immediate
//   sext   sign-extend the immediate        aluc   ALU operation (aluc_e)
//   wmem   write the data memory            pcsrc  next-PC select (pcsrc_e)
// Decoded instructions: add, sub, and, or, sll, addi, lw, sw, lui, jal (the
// instruction table), ori (used by the demonstration program), and beq, bne,
// jr, j (implied by the branch, register and jump inputs of the next-PC
// multiplexer and the z input of the decoder). Opcodes are the MIPS32 ones.
// Any other encoding writes nothing and falls through to PC+4; that is this
// design's choice. Purely combinational. The six ALU operations use codes
// 0-5, so aluc[3] is always 0; the bit is kept for the 4-bit aluc width of
// the ALU interface.
module control_unit
  import sccpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  input  logic       z,
  output logic       wreg,
  output logic       regrt,
  output logic       jal,
  output logic       m2reg,
  output logic       shift,
  output logic       aluimm,
  output logic       sext,
  output logic [3:0] aluc,
  output logic       wmem,
  output logic [1:0] pcsrc
);

  aluc_e  alu_op;
  pcsrc_e pc_sel;

  always_comb begin
    wreg   = 1'b0;
    regrt  = 1'b0;
    jal    = 1'b0;
    m2reg  = 1'b0;
    shift  = 1'b0;
    aluimm = 1'b0;
    sext   = 1'b0;
    wmem   = 1'b0;
    alu_op = ALU_ADD;
    pc_sel = PC_PLUS4;
    unique case (op)
      OP_RTYPE: begin
        unique case (func)
          FN_ADD: begin wreg = 1'b1; alu_op = ALU_ADD; end
          FN_SUB: begin wreg = 1'b1; alu_op = ALU_SUB; end
          FN_AND: begin wreg = 1'b1; alu_op = ALU_AND; end
          FN_OR:  begin wreg = 1'b1; alu_op = ALU_OR;  end
          FN_SLL: begin wreg = 1'b1; alu_op = ALU_SLL; shift = 1'b1; end
          FN_JR:  pc_sel = PC_REG;
          default: ;
        endcase
      end
      OP_ADDI: begin wreg = 1'b1; regrt = 1'b1; aluimm = 1'b1; sext = 1'b1; alu_op = ALU_ADD; end
      OP_ORI:  begin wreg = 1'b1; regrt = 1'b1; aluimm = 1'b1; alu_op = ALU_OR; end
      OP_LUI:  begin wreg = 1'b1; regrt = 1'b1; aluimm = 1'b1; alu_op = ALU_LUI; end
      OP_LW:   begin wreg = 1'b1; regrt = 1'b1; aluimm = 1'b1; sext = 1'b1; m2reg = 1'b1; end
      OP_SW:   begin wmem = 1'b1; aluimm = 1'b1; sext = 1'b1; end
      OP_BEQ:  begin sext = 1'b1; alu_op = ALU_SUB; if (z)  pc_sel = PC_BRANCH; end
      OP_BNE:  begin sext = 1'b1; alu_op = ALU_SUB; if (!z) pc_sel = PC_BRANCH; end
      OP_J:    pc_sel = PC_JUMP;
      OP_JAL:  begin wreg = 1'b1; jal = 1'b1; pc_sel = PC_JUMP; end
      default: ;
    endcase
  end

  assign aluc  = alu_op;
  assign pcsrc = pc_sel;

endmodule
