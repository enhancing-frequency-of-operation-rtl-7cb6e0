// sccpu: single-cycle MIPS32-subset CPU core (program counter, register
// file, ALU, control unit and the datapath multiplexers).
//
// Every instruction is fetched, decoded and executed in one clock cycle; the
// program counter and the register file are updated at the rising edge that
// ends the cycle. The datapath follows the schematic of the design:
//   - the PC register feeds the instruction address pc; PC+4 (p4) is formed
//     by an adder;
//   - a 4:1 multiplexer picks the next PC: 0 PC+4, 1 branch target
//     (p4 + sign-extended offset << 2), 2 register target (qa, for jr),
//     3 jump target ({p4[31:28], addr, 2'b00});
//   - five 2:1 multiplexers pick the destination register number (rd or rt),
//     the ALU a-input (qa or the shift amount sa), the ALU b-input (qb or the
//     extended immediate), the write-back value (ALU result or memory data)
//     and the register write data (that value or PC+4 for jal);
//   - a second function block forces the destination to r31 for jal, and the
//     extender e sign- or zero-extends the 16-bit immediate.
// Interface: inst is the instruction read at pc, mem is the data read at the
// address alu; data (= qb) and wmem drive the data memory write. The reset
// clrn is active HIGH, synchronous, and clears the PC and the registers: the
// name and the polarity follow the design's waveforms, where a high clrn
// resets the CPU; the synchronous style is this design's choice.
module sccpu
  import sccpu_pkg::*;
(
  input  logic        clk,
  input  logic        clrn,
  input  logic [31:0] inst,
  input  logic [31:0] mem,
  output logic [31:0] pc,
  output logic [31:0] alu,
  output logic [31:0] data,
  output logic        wmem,
  output logic        m2reg
);

  // Instruction fields.
  logic [5:0]  op, func;
  logic [4:0]  rs, rt, rd, sa;
  logic [15:0] imm;
  logic [25:0] addr;

  assign op   = inst[31:26];
  assign rs   = inst[25:21];
  assign rt   = inst[20:16];
  assign rd   = inst[15:11];
  assign sa   = inst[10:6];
  assign func = inst[5:0];
  assign imm  = inst[15:0];
  assign addr = inst[25:0];

  // Control.
  logic       wreg, regrt, jal, shift, aluimm, sext, z;
  logic [3:0] aluc;
  logic [1:0] pcsrc;

  control_unit cu (
    .op, .func, .z,
    .wreg, .regrt, .jal, .m2reg, .shift, .aluimm, .sext, .aluc, .wmem, .pcsrc
  );

  // Next-PC logic.
  logic [31:0] p4, immx, bpc, jpc, npc, qa, qb;

  assign p4   = pc + 32'd4;
  assign immx = {{16{sext & imm[15]}}, imm};
  assign bpc  = p4 + {immx[29:0], 2'b00};
  assign jpc  = {p4[31:28], addr, 2'b00};

  mux4 #(.WIDTH(32)) nextpc (.d0(p4), .d1(bpc), .d2(qa), .d3(jpc), .s(pcsrc), .y(npc));

  always_ff @(posedge clk) begin
    if (clrn) pc <= 32'h0000_0000;
    else      pc <= npc;
  end

  // Register file and write-back path.
  logic [4:0]  reg_dest, wn;
  logic [31:0] wb_val, wdata, alua, alub;

  mux2 #(.WIDTH(5))  link_mux  (.d0(rd), .d1(rt), .s(regrt), .y(reg_dest));
  assign wn = jal ? 5'd31 : reg_dest;

  regfile #(.NREGS(32), .WIDTH(32)) rf (
    .clk, .rst(clrn),
    .rna(rs), .rnb(rt), .wn, .d(wdata), .we(wreg),
    .qa, .qb
  );

  // ALU and its operand selection.
  mux2 #(.WIDTH(32)) alua_mux (.d0(qa), .d1({27'b0, sa}), .s(shift), .y(alua));
  mux2 #(.WIDTH(32)) alub_mux (.d0(qb), .d1(immx), .s(aluimm), .y(alub));

  alu al_unit (.a(alua), .b(alub), .aluc, .r(alu), .z);

  mux2 #(.WIDTH(32)) result_mux (.d0(alu), .d1(mem), .s(m2reg), .y(wb_val));
  mux2 #(.WIDTH(32)) jal_mux    (.d0(wb_val), .d1(p4), .s(jal), .y(wdata));

  assign data = qb;

endmodule
