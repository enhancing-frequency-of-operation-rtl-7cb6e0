// mux4: parameterised 4:1 multiplexer.
//
// y = d[s] for the four inputs d0..d3. In the CPU it selects the next program
// counter, inputs in the order given by the datapath figure: 0 PC+4,
// 1 branch target, 2 register (jump-register) target, 3 jump target.
// Combinational.
module mux4 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  input  logic [1:0]       s,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (s)
      2'd0: y = d0;
      2'd1: y = d1;
      2'd2: y = d2;
      default: y = d3;
    endcase
  end

endmodule
