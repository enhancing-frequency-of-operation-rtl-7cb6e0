// mux2: parameterised 2:1 multiplexer.
//
// y = s ? d1 : d0. The CPU uses five of these, as in its description: the
// ALU a-input (register or shift amount), the ALU b-input (register or
// extended immediate), the memory-or-ALU result, the write data of the
// register file (result or return address) and the destination register
// number (rd or rt). Combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             s,
  output logic [WIDTH-1:0] y
);

  assign y = s ? d1 : d0;

endmodule
