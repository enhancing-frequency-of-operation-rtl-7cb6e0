// inst_mem: combinational instruction ROM.
//
// A 32-bit wide read-only memory of WORDS words, addressed by the byte
// address a (word index a[.. :2]); the instruction do appears in the same
// cycle, with no clock, as the design description asks of the instruction
// memory. Its contents are the parameter PROG (PROG_LEN words from address
// 0); the remaining words read as 0, which is the MIPS nop (sll $0,$0,0).
// The default program is the 13-instruction sequence shown executing in the
// design's simulation waveforms (lui, addi, addi, sll, sw, jal, add, lw, ori,
// sw, then nops). WORDS = 64 is this design's choice; the document gives no
// size. Addresses beyond the ROM wrap around.
module inst_mem
  import sccpu_pkg::*;
#(
  parameter int unsigned WORDS    = 64,
  parameter int unsigned PROG_LEN = 13,
  parameter logic [31:0] PROG [PROG_LEN] = '{
    32'h3c010000,  // 00: lui  $1, 0
    32'h20420030,  // 04: addi $2, $2, 0x30
    32'h20250020,  // 08: addi $5, $1, 0x20
    32'h00021080,  // 0c: sll  $2, $2, 2
    32'hac050000,  // 10: sw   $5, 0($0)
    32'h0c000007,  // 14: jal  0x1c
    32'h00000000,  // 18: (skipped by the jal)
    32'h00421020,  // 1c: add  $2, $2, $2
    32'h8c040000,  // 20: lw   $4, 0($0)
    32'h34420032,  // 24: ori  $2, $2, 0x32
    32'hac040004,  // 28: sw   $4, 4($0)
    32'h00000000,  // 2c: nop
    32'h00000000   // 30: nop
  }
) (
  input  logic [31:0] a,
  output logic [31:0] do_
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [AW-1:0] idx;

  assign idx = a[AW+1:2];

  always_comb begin
    do_ = 32'h0000_0000;
    for (int unsigned i = 0; i < PROG_LEN; i++) begin
      if (i < WORDS && idx == AW'(i)) do_ = PROG[i];
    end
  end

endmodule
