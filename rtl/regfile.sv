// regfile: 32 x 32-bit general purpose register file.
//
// Two combinational read ports (read register numbers rna, rnb giving qa, qb)
// and one write port (register number wn, data d, enable we) written on the
// rising clock edge, as the register file is described for the CPU: 32
// registers, 5-bit port numbers, a 32-bit data input and a write enable.
// Register 0 reads as zero and ignores writes, following the MIPS convention
// the instruction set comes from. A write is seen by the reads from the next
// cycle on (no write-to-read bypass: the single-cycle CPU does not need one).
// Synchronous reset rst clears every register; the reset behaviour is this
// design's choice.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] rna,
  input  logic [$clog2(NREGS)-1:0] rnb,
  input  logic [$clog2(NREGS)-1:0] wn,
  input  logic [WIDTH-1:0]         d,
  input  logic                     we,
  output logic [WIDTH-1:0]         qa,
  output logic [WIDTH-1:0]         qb
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && wn != '0) begin
      regs[wn] <= d;
    end
  end

  assign qa = (rna == '0) ? '0 : regs[rna];
  assign qb = (rnb == '0) ? '0 : regs[rnb];

endmodule
