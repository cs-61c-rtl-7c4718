// mux2: two-input multiplexer of parameterised width.
//
// y = in0 when sel is 0, in1 when sel is 1. The datapath uses four of them:
// RegDst (rt/rd, 5 bits), ALUSrc (busB/immediate), MemtoReg (ALU/memory) and
// the next-PC select (PC+4/branch target). Purely combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule
