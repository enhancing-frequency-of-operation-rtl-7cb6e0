// alu: 32-bit arithmetic and logic unit of the single-cycle CPU.
//
// Two 32-bit operands a and b, a 4-bit operation select aluc, a 32-bit result
// r and a zero flag z that is high when r is zero. This follows the ALU
// interface of the design description. The operation set is the one needed
// by the supported instructions: add, subtract, and, or, shift-left-logical
// (b shifted by a[4:0], the shift amount arriving on a through the shift
// multiplexer) and load-upper-immediate (b[15:0] moved to the upper half).
// The numeric aluc codes (sccpu_pkg::aluc_e) are this design's choice; an
// unused code gives add. Purely combinational; no overflow trap is raised
// for add/sub, which is this design's choice.
module alu
  import sccpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [3:0]  aluc,
  output logic [31:0] r,
  output logic        z
);

  always_comb begin
    unique case (aluc_e'(aluc))
      ALU_SUB: r = a - b;
      ALU_AND: r = a & b;
      ALU_OR:  r = a | b;
      ALU_SLL: r = b << a[4:0];
      ALU_LUI: r = {b[15:0], 16'h0000};
      default: r = a + b;
    endcase
  end

  assign z = (r == 32'd0);

endmodule
