// sccomp: the complete single-cycle computer - the CPU core with its
// instruction ROM and data RAM.
//
// The CPU fetches inst from the ROM at pc, executes it, and reads or writes
// the data RAM at the ALU result r in the same cycle; everything advances at
// the rising edge of clk. The outputs are the signals shown in the design's
// simulation waveforms: r (ALU result), pc, inst, m2reg, wmem, and mem_do,
// the word the data memory returns at address r (labelled immediate_data in
// the waveforms). clrn is an active-high synchronous reset, as in those
// waveforms. The default ROM program (PROG) is the one the waveforms show;
// IM_WORDS = 64 and DM_WORDS = 32 are this design's sizes, the document
// gives none.
module sccomp
  import sccpu_pkg::*;
#(
  parameter int unsigned IM_WORDS = 64,
  parameter int unsigned DM_WORDS = 32,
  parameter int unsigned PROG_LEN = 13,
  parameter logic [31:0] PROG [PROG_LEN] = '{
    32'h3c010000, 32'h20420030, 32'h20250020, 32'h00021080,
    32'hac050000, 32'h0c000007, 32'h00000000, 32'h00421020,
    32'h8c040000, 32'h34420032, 32'hac040004, 32'h00000000,
    32'h00000000
  }
) (
  input  logic        clk,
  input  logic        clrn,
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic [31:0] r,
  output logic [31:0] mem_do,
  output logic        m2reg,
  output logic        wmem
);

  logic [31:0] data;

  sccpu cpu (
    .clk, .clrn, .inst, .mem(mem_do),
    .pc, .alu(r), .data, .wmem, .m2reg
  );

  inst_mem #(.WORDS(IM_WORDS), .PROG_LEN(PROG_LEN), .PROG(PROG)) imem (
    .a(pc), .do_(inst)
  );

  data_mem #(.WORDS(DM_WORDS)) dmem (
    .clk, .a(r), .di(data), .we(wmem), .do_(mem_do)
  );

endmodule
