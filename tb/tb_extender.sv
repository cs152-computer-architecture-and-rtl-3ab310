// tb_extender: exhaustive test of the immediate extender. Every 16-bit
// value is extended with ExtOp = 0 (upper half must be 0) and ExtOp = 1
// (upper half must copy bit 15), and the result is compared with the
// integer value of the immediate read as unsigned or signed.
module tb_extender;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int e = 0; e < 2; e++) begin
        int expect_val;
        imm16 = 16'(v); ext_op = e[0];
        #1;
        expect_val = (e == 1 && v >= 32768) ? v - 65536 : v;
        checks++;
        if ($signed(imm32) !== expect_val) begin
          failures++;
          if (failures < 10) $display("FAIL imm16=%h ext_op=%0d imm32=%h", imm16, e, imm32);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
