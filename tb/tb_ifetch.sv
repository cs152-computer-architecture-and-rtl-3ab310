// tb_ifetch: checks the instruction fetch unit. Random words are loaded
// into its instruction memory; after reset the PC must be 0. Then, cycle
// by cycle, nPC_sel and Jump are driven at random and the PC is compared
// with a model of the three next-PC rules (PC+4, PC+4+SignExt(imm16)*4,
// {PC+4[31:28], target, 00}), with imm16 and target taken from the word the
// model says is being fetched. Each rule is counted and must occur.
module tb_ifetch;
  localparam int WORDS = 256;
  logic        clk = 1'b0, rst_n, npc_sel, jump, imem_we;
  logic [31:0] imem_waddr, imem_wdata, pc, instr;
  logic [31:0] mem [WORDS];
  logic [31:0] exp_pc, exp_instr;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br = 0, n_j = 0;

  ifetch #(.IMEM_WORDS(WORDS)) dut (
    .clk(clk), .rst_n(rst_n), .npc_sel(npc_sel), .jump(jump), .imem_we(imem_we),
    .imem_waddr(imem_waddr), .imem_wdata(imem_wdata), .pc(pc), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; npc_sel = 1'b0; jump = 1'b0; imem_we = 1'b1;
    for (int i = 0; i < WORDS; i++) begin
      mem[i] = $urandom;
      imem_waddr = 32'(i * 4); imem_wdata = mem[i];
      @(posedge clk); #1;
    end
    imem_we = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    exp_pc = 32'h0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] plus4;
      automatic int sel = $urandom_range(0, 2);
      npc_sel = (sel == 1) || (sel == 2 && $urandom_range(0, 1) == 1);
      jump    = (sel == 2);
      exp_instr = mem[exp_pc[9:2] % WORDS];
      #1;
      checks++;
      if (pc !== exp_pc || instr !== exp_instr) begin
        failures++;
        $display("FAIL pc=%h (exp %h) instr=%h (exp %h)", pc, exp_pc, instr, exp_instr);
      end
      plus4 = exp_pc + 32'd4;
      if (jump) begin
        exp_pc = {plus4[31:28], exp_instr[25:0], 2'b00}; n_j++;
      end else if (npc_sel) begin
        exp_pc = plus4 + {{14{exp_instr[15]}}, exp_instr[15:0], 2'b00}; n_br++;
      end else begin
        exp_pc = plus4; n_seq++;
      end
      @(posedge clk); #1;
    end
    $display("next-PC rules used: +4 %0d, branch %0d, jump %0d", n_seq, n_br, n_j);
    checks++;
    if (n_seq == 0 || n_br == 0 || n_j == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
