// data_mem: data RAM of the single-cycle CPU.
//
// WORDS x 32-bit words addressed by the byte address a (word index a[..:2]).
// Reads are combinational (do_ follows a in the same cycle), so a load
// completes inside the single CPU cycle; a write of di happens at the rising
// clock edge when we is high. The memory is named in the design description
// but its size and timing are not given: 32 words, the asynchronous read and
// the synchronous write are this design's choices. The contents are not
// reset. Addresses beyond the memory wrap around.
module data_mem #(
  parameter int unsigned WORDS = 32
) (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] di,
  input  logic        we,
  output logic [31:0] do_
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0]   ram [WORDS];
  logic [AW-1:0] idx;

  assign idx = a[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) ram[idx] <= di;
  end

  assign do_ = ram[idx];

endmodule
