// tb_inst_mem: loads the instruction memory through its load port with
// words derived from their index, then reads every word back through the
// fetch port in random order, with random address bits 1:0 and above the
// memory size, comparing with the loaded value.
module tb_inst_mem;
  localparam int WORDS = 256;
  logic        clk = 1'b0, we;
  logic [31:0] waddr, wdata, adr, instr;
  int checks = 0, failures = 0;

  inst_mem #(.WORDS(WORDS)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                 .adr(adr), .instr(instr));

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(input int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'hA5A5_0000;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b1; adr = '0;
    for (int i = 0; i < WORDS; i++) begin
      waddr = 32'(i * 4); wdata = pattern(i);
      @(posedge clk); #1;
    end
    we = 1'b0; wdata = 32'hDEAD_BEEF;
    for (int n = 0; n < 2000; n++) begin
      automatic int idx = $urandom_range(0, WORDS - 1);
      waddr = $urandom;
      adr = {22'($urandom), 8'(idx), 2'($urandom)};
      #1;
      checks++;
      if (instr !== pattern(idx)) begin
        failures++;
        $display("FAIL adr=%h instr=%h expected %h", adr, instr, pattern(idx));
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
