// alu_control: the local ALU decoder. From the 3-bit ALUop of the main
// control and the low four bits of the func field it produces the 3-bit
// ALUctr, as two-level sums of products:
//   ALUctr<2> = !ALUop<2> & ALUop<0>
//             + ALUop<2> & !func<2> & func<1> & !func<0>
//   ALUctr<1> = !ALUop<2> & !ALUop<1>
//             + ALUop<2> & !func<2> & !func<0>
//   ALUctr<0> = !ALUop<2> & ALUop<1>
//             + ALUop<2> & !func<3> & func<2> & !func<1> & func<0>
//             + ALUop<2> & func<3> & !func<2> & func<1> & !func<0>
// With ALUop<2> = 0 the ALU does Add (000), Subtract (001) or Or (010);
// with ALUop<2> = 1 (R-type) func 0000/0010/0100/0101/1010 select
// Add/Subtract/And/Or/Set-on-less-than. The first terms of ALUctr<1> and
// ALUctr<0> use ALUop<1>, which is what the ALUctr truth table needs;
// func<5:4> are not used. Purely combinational.
module alu_control (
  input  logic [2:0] alu_op,
  input  logic [5:0] func,
  output logic [2:0] alu_ctr
);
  logic [3:0] f;

  always_comb begin
    f = func[3:0];
    alu_ctr[2] = (~alu_op[2] & alu_op[0])
               | ( alu_op[2] & ~f[2] & f[1] & ~f[0]);
    alu_ctr[1] = (~alu_op[2] & ~alu_op[1])
               | ( alu_op[2] & ~f[2] & ~f[0]);
    alu_ctr[0] = (~alu_op[2] & alu_op[1])
               | ( alu_op[2] & ~f[3] & f[2] & ~f[1] & f[0])
               | ( alu_op[2] & f[3] & ~f[2] & f[1] & ~f[0]);
  end
endmodule
