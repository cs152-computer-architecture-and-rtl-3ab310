// tb_main_control: applies all 64 op codes to the main control. The six
// defined op codes are checked against the main-control truth table,
// skipping its don't-care entries; every other op code must assert no
// RegWrite, MemWrite, Branch or Jump.
module tb_main_control;
  import mips_pkg::*;
  logic [5:0] op;
  main_ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .ctrl(ctrl));

  // expected value and care mask, bit order:
  // reg_dst alu_src mem_to_reg reg_write mem_write branch jump ext_op alu_op[2:0]
  task automatic check(input logic [5:0] o, input logic [10:0] exp, input logic [10:0] care, input string name);
    op = o;
    #1;
    checks++;
    if (((ctrl ^ exp) & care) != '0) begin
      failures++;
      $display("FAIL %s op=%b ctrl=%b expected %b (mask %b)", name, o, ctrl, exp, care);
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
    //                       RD AS MR RW MW Br J EO ALUop
    check(6'b00_0000, 11'b1__0__0__1__0__0__0_0__100, 11'b1_1_1_1_1_1_1_0_111, "R-type");
    check(6'b00_1101, 11'b0__1__0__1__0__0__0_0__010, 11'b1_1_1_1_1_1_1_1_111, "ori");
    check(6'b10_0011, 11'b0__1__1__1__0__0__0_1__000, 11'b1_1_1_1_1_1_1_1_111, "lw");
    check(6'b10_1011, 11'b0__1__0__0__1__0__0_1__000, 11'b0_1_0_1_1_1_1_1_111, "sw");
    check(6'b00_0100, 11'b0__0__0__0__0__1__0_0__001, 11'b0_1_0_1_1_1_1_0_111, "beq");
    check(6'b00_0010, 11'b0__0__0__0__0__0__1_0__000, 11'b0_0_0_1_1_1_1_0_000, "jump");
    for (int o = 0; o < 64; o++) begin
      if (!(o inside {6'b00_0000, 6'b00_1101, 6'b10_0011, 6'b10_1011, 6'b00_0100, 6'b00_0010}))
        check(6'(o), 11'b0, 11'b0_0_0_1_1_1_1_0_000, "undefined");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
