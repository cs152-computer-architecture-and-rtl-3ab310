// alu: 32-bit ALU of the single-cycle datapath.
//
// ALUctr selects Add (010), Subtract (110), And (000), Or (001) or
// Set-on-less-than (111), the encoding the ALU control truth table uses.
// Zero is 1 when the result is all zeros; the branch uses it as "Equal"
// after a subtract. Set-on-less-than compares a and b as signed numbers
// and yields 1 or 0. Add and subtract wrap without an overflow flag, and
// the three unused ALUctr codes give 0: both are this design's choices.
// Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);
  logic [WIDTH-1:0] diff;

  always_comb begin
    diff = a - b;
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = diff;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_SLT: result = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
