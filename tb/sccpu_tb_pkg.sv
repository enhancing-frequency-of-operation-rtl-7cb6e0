// sccpu_tb_pkg: testbench helpers for the single-cycle CPU - instruction
// encoders (so test programs read as assembly) and an instruction-level
// reference model of the supported MIPS32 subset, written from the
// instruction set semantics and independent of the RTL. The model keeps 32
// registers, a 32-word data memory indexed by address bits [6:2] and a PC;
// step() executes one instruction.
package sccpu_tb_pkg;

  function automatic logic [31:0] r_type(int rs, int rt, int rd, int sa, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sa), fn};
  endfunction

  function automatic logic [31:0] i_type(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic logic [31:0] j_type(logic [5:0] op, int target_byte_addr);
    return {op, 26'(target_byte_addr >> 2)};
  endfunction

  function automatic logic [31:0] add_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h20); endfunction
  function automatic logic [31:0] sub_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h22); endfunction
  function automatic logic [31:0] and_ (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h24); endfunction
  function automatic logic [31:0] or_  (int rd, int rs, int rt); return r_type(rs, rt, rd, 0, 6'h25); endfunction
  function automatic logic [31:0] sll_ (int rd, int rt, int sa); return r_type(0, rt, rd, sa, 6'h00); endfunction
  function automatic logic [31:0] jr_  (int rs);                 return r_type(rs, 0, 0, 0, 6'h08); endfunction
  function automatic logic [31:0] addi_(int rt, int rs, int imm); return i_type(6'h08, rs, rt, imm); endfunction
  function automatic logic [31:0] ori_ (int rt, int rs, int imm); return i_type(6'h0d, rs, rt, imm); endfunction
  function automatic logic [31:0] lui_ (int rt, int imm);         return i_type(6'h0f, 0, rt, imm); endfunction
  function automatic logic [31:0] lw_  (int rt, int off, int rs); return i_type(6'h23, rs, rt, off); endfunction
  function automatic logic [31:0] sw_  (int rt, int off, int rs); return i_type(6'h2b, rs, rt, off); endfunction
  function automatic logic [31:0] beq_ (int rs, int rt, int off); return i_type(6'h04, rs, rt, off); endfunction
  function automatic logic [31:0] bne_ (int rs, int rt, int off); return i_type(6'h05, rs, rt, off); endfunction
  function automatic logic [31:0] j_   (int target);              return j_type(6'h02, target); endfunction
  function automatic logic [31:0] jal_ (int target);              return j_type(6'h03, target); endfunction

  typedef struct {
    logic [31:0] pc;
    logic [31:0] gpr [32];
    logic [31:0] dmem [32];
  } arch_state_t;

  typedef enum int {
    K_ADD, K_SUB, K_AND, K_OR, K_SLL, K_JR, K_ADDI, K_ORI, K_LUI, K_LW, K_SW,
    K_BEQ_TAKEN, K_BEQ_NOT, K_BNE_TAKEN, K_BNE_NOT, K_J, K_JAL, K_OTHER, K_NUM
  } kind_e;

  // Executes one instruction on s; returns what kind it was. Memory writes
  // are reported through wr_en / wr_addr / wr_data.
  function automatic kind_e step(ref arch_state_t s, input logic [31:0] inst,
                                 output logic wr_en, output logic [31:0] wr_addr,
                                 output logic [31:0] wr_data);
    logic [5:0]  op = inst[31:26], fn = inst[5:0];
    int          rs = int'(inst[25:21]), rt = int'(inst[20:16]), rd = int'(inst[15:11]);
    logic [31:0] a = s.gpr[rs], b = s.gpr[rt];
    logic [31:0] se = {{16{inst[15]}}, inst[15:0]};
    logic [31:0] ze = {16'h0, inst[15:0]};
    logic [31:0] next = s.pc + 4;
    logic [31:0] addr;
    int          dest = -1;
    logic [31:0] val = 0;
    kind_e       k = K_OTHER;
    wr_en = 0; wr_addr = 0; wr_data = 0;
    case (op)
      6'h00: case (fn)
        6'h20: begin dest = rd; val = a + b;  k = K_ADD; end
        6'h22: begin dest = rd; val = a - b;  k = K_SUB; end
        6'h24: begin dest = rd; val = a & b;  k = K_AND; end
        6'h25: begin dest = rd; val = a | b;  k = K_OR;  end
        6'h00: begin dest = rd; val = b << inst[10:6]; k = K_SLL; end
        6'h08: begin next = a; k = K_JR; end
        default: ;
      endcase
      6'h08: begin dest = rt; val = a + se; k = K_ADDI; end
      6'h0d: begin dest = rt; val = a | ze; k = K_ORI; end
      6'h0f: begin dest = rt; val = {inst[15:0], 16'h0}; k = K_LUI; end
      6'h23: begin addr = a + se; dest = rt; val = s.dmem[addr[6:2]]; k = K_LW; end
      6'h2b: begin addr = a + se; wr_en = 1; wr_addr = addr; wr_data = b; k = K_SW; end
      6'h04: if (a == b) begin next = s.pc + 4 + (se << 2); k = K_BEQ_TAKEN; end else k = K_BEQ_NOT;
      6'h05: if (a != b) begin next = s.pc + 4 + (se << 2); k = K_BNE_TAKEN; end else k = K_BNE_NOT;
      6'h02: begin next = {next[31:28], inst[25:0], 2'b00}; k = K_J; end
      6'h03: begin dest = 31; val = next; next = {next[31:28], inst[25:0], 2'b00}; k = K_JAL; end
      default: ;
    endcase
    if (wr_en) s.dmem[wr_addr[6:2]] = wr_data;
    if (dest > 0) s.gpr[dest] = val;
    s.pc = next;
    return k;
  endfunction

  function automatic string kind_name(kind_e k);
    return k.name();
  endfunction

endpackage
