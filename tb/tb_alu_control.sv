// tb_alu_control: checks the local ALU decoder against its truth table.
// For ALUop 000/001/010 every func value must give Add (010), Subtract
// (110) or Or (001); for ALUop 100 (R-type) the five func codes add, sub,
// and, or, slt, with any func<5:4>, must give 010, 110, 000, 001, 111.
// Rows the table leaves as don't care are not checked.
module tb_alu_control;
  logic [2:0] alu_op, alu_ctr;
  logic [5:0] func;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op(alu_op), .func(func), .alu_ctr(alu_ctr));

  task automatic expect_ctr(input logic [2:0] op, input logic [5:0] fn, input logic [2:0] exp);
    alu_op = op; func = fn;
    #1;
    checks++;
    if (alu_ctr !== exp) begin
      failures++;
      $display("FAIL ALUop=%b func=%b ALUctr=%b expected %b", op, fn, alu_ctr, exp);
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
    for (int f = 0; f < 64; f++) begin
      expect_ctr(3'b000, 6'(f), 3'b010);   // lw, sw: Add
      expect_ctr(3'b001, 6'(f), 3'b110);   // beq: Subtract
      expect_ctr(3'b010, 6'(f), 3'b001);   // ori: Or
    end
    for (int hi = 0; hi < 4; hi++) begin
      expect_ctr(3'b100, {2'(hi), 4'b0000}, 3'b010);  // add
      expect_ctr(3'b100, {2'(hi), 4'b0010}, 3'b110);  // sub
      expect_ctr(3'b100, {2'(hi), 4'b0100}, 3'b000);  // and
      expect_ctr(3'b100, {2'(hi), 4'b0101}, 3'b001);  // or
      expect_ctr(3'b100, {2'(hi), 4'b1010}, 3'b111);  // slt
    end
    // bit 1 of ALUop is ignored when bit 2 is set
    expect_ctr(3'b110, 6'b10_0010, 3'b110);
    expect_ctr(3'b111, 6'b10_0101, 3'b001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
