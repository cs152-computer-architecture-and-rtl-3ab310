// tb_alu: self-checking test of the ALU. Applies corner values and random
// operands under each ALUctr code and compares result and Zero with values
// computed here from the ALU control table (010 add, 110 subtract, 000 and,
// 001 or, 111 signed set-on-less-than, other codes 0).
module tb_alu;
  logic [31:0] a, b, result;
  logic [2:0]  ctr;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(ctr), .result(result), .zero(zero));

  function automatic logic [31:0] model(input logic [31:0] x, input logic [31:0] y, input logic [2:0] c);
    case (c)
      3'b010: return x + y;
      3'b110: return x + ~y + 32'd1;
      3'b000: return x & y;
      3'b001: return x | y;
      3'b111: begin
        // signed less-than: differing signs decide, else compare magnitudes
        if (x[31] != y[31]) return {31'd0, x[31]};
        return {31'd0, x < y};
      end
      default: return 32'd0;
    endcase
  endfunction

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic [2:0] c);
    logic [31:0] exp;
    a = x; b = y; ctr = c;
    #1;
    exp = model(x, y, c);
    checks++;
    if (result !== exp || zero !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL ctr=%b a=%h b=%h result=%h zero=%b expected %h", c, x, y, result, zero, exp);
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
    automatic logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h1234_5678};
    for (int c = 0; c < 8; c++) begin
      foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j], 3'(c));
      for (int n = 0; n < 500; n++) apply($urandom, $urandom, 3'(c));
    end
    // equal operands under subtract must raise Zero (the beq case)
    for (int n = 0; n < 100; n++) begin
      automatic logic [31:0] v = $urandom;
      apply(v, v, 3'b110);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
