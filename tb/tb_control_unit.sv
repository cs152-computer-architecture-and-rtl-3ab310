// tb_control_unit: checks the complete control against the summary of
// control signals. For each instruction (add, sub, and, or, slt, ori, lw,
// sw, beq, j) and both values of Equal it compares every control output
// whose value the summary fixes, including ALUctr and nPC_sel = Branch &
// Equal.
module tb_control_unit;
  logic [5:0] op, func;
  logic       equal;
  logic       reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, ext_op, npc_sel, jump;
  logic [2:0] alu_ctr;
  int checks = 0, failures = 0;

  control_unit dut (.op(op), .func(func), .equal(equal), .reg_dst(reg_dst), .alu_src(alu_src),
                    .mem_to_reg(mem_to_reg), .reg_wr(reg_wr), .mem_wr(mem_wr), .ext_op(ext_op),
                    .npc_sel(npc_sel), .jump(jump), .alu_ctr(alu_ctr));

  // order: reg_dst alu_src mem_to_reg reg_wr mem_wr ext_op npc_sel jump alu_ctr[2:0]
  task automatic check(input string name, input logic [5:0] o, input logic [5:0] f, input logic eq,
                       input logic [10:0] exp, input logic [10:0] care);
    logic [10:0] got;
    op = o; func = f; equal = eq;
    #1;
    got = {reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, ext_op, npc_sel, jump, alu_ctr};
    checks++;
    if (((got ^ exp) & care) != '0) begin
      failures++;
      $display("FAIL %s equal=%b got %b expected %b (mask %b)", name, eq, got, exp, care);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      //                                                     RD AS MR RW MW EO nP J ALUctr
      check("add", 6'b00_0000, 6'b10_0000, e[0], 11'b1_0_0_1_0_0_0_0_010, 11'b1_1_1_1_1_0_1_1_111);
      check("sub", 6'b00_0000, 6'b10_0010, e[0], 11'b1_0_0_1_0_0_0_0_110, 11'b1_1_1_1_1_0_1_1_111);
      check("and", 6'b00_0000, 6'b10_0100, e[0], 11'b1_0_0_1_0_0_0_0_000, 11'b1_1_1_1_1_0_1_1_111);
      check("or",  6'b00_0000, 6'b10_0101, e[0], 11'b1_0_0_1_0_0_0_0_001, 11'b1_1_1_1_1_0_1_1_111);
      check("slt", 6'b00_0000, 6'b10_1010, e[0], 11'b1_0_0_1_0_0_0_0_111, 11'b1_1_1_1_1_0_1_1_111);
      check("ori", 6'b00_1101, 6'($urandom), e[0], 11'b0_1_0_1_0_0_0_0_001, 11'b1_1_1_1_1_1_1_1_111);
      check("lw",  6'b10_0011, 6'($urandom), e[0], 11'b0_1_1_1_0_1_0_0_010, 11'b1_1_1_1_1_1_1_1_111);
      check("sw",  6'b10_1011, 6'($urandom), e[0], 11'b0_1_0_0_1_1_0_0_010, 11'b0_1_0_1_1_1_1_1_111);
      check("beq", 6'b00_0100, 6'($urandom), e[0], {8'b0_0_0_0_0_0_0_0, 3'b110} | (11'(e) << 4),
            11'b0_1_0_1_1_0_1_1_111);
      check("j",   6'b00_0010, 6'($urandom), e[0], 11'b0_0_0_0_0_0_0_1_000, 11'b0_0_0_1_1_0_1_1_000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
