// alu: the datapath ALU.
//
// Combinational. ALUctr selects one of five operations on the two operands:
// 010 add, 110 subtract (a - b), 000 and, 001 or, 111 set-on-less-than
// (result 1 when a < b as signed numbers, else 0). Zero is 1 when the result
// is all zeros; a branch-on-equal subtracts the two registers and looks at
// Zero. The operation set and its codes are the design's; the signed
// compare, the 0 result for the three unused codes and the absence of an
// overflow output are choices made here.
module alu
  import sc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       aluctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  logic [WIDTH-1:0] diff;

  always_comb begin
    diff = a - b;
    unique case (aluctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = diff;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, ($signed(a) < $signed(b))};
      default: result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
