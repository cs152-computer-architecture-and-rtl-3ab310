// extender: widens the 16-bit immediate of an I-type instruction to 32
// bits. ExtOp = 1 copies imm16<15> into the upper half (sign extension, for
// lw, sw and the branch offset); ExtOp = 0 fills it with zeros (ori).
// Purely combinational. The two modes and their use follow the control
// tables; the port names are this design's.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);
  always_comb begin
    imm32 = {{16{ext_op & imm16[15]}}, imm16};
  end
endmodule
