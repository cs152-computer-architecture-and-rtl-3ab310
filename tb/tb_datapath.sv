// tb_datapath: drives the datapath with instructions and the control
// values the summary of control signals gives for them, and compares the
// write-back (register, value), the store (address, data) and Zero with a
// register/memory model. The data memory is first cleared by stores from
// register 0; random add, sub, and, or, slt, ori, lw, sw and beq follow.
module tb_datapath;
  localparam int DW = 64;   // data memory words in this test
  logic        clk = 1'b0, rst_n;
  logic [31:0] instr;
  logic        reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, ext_op;
  logic [2:0]  alu_ctr;
  logic        zero, rf_we, dm_we;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata, dm_addr, dm_wdata;
  logic [31:0] regs [32];
  logic [31:0] mem [DW];
  int checks = 0, failures = 0;

  datapath #(.DMEM_WORDS(DW)) dut (
    .clk(clk), .rst_n(rst_n), .instr(instr), .reg_dst(reg_dst), .alu_src(alu_src),
    .mem_to_reg(mem_to_reg), .reg_wr(reg_wr), .mem_wr(mem_wr), .ext_op(ext_op),
    .alu_ctr(alu_ctr), .zero(zero), .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata));

  always #5 clk = ~clk;

  // one instruction: set controls, check outputs, clock, update model
  task automatic exec(input int kind, input logic [4:0] rs, input logic [4:0] rt,
                      input logic [4:0] rd, input logic [15:0] imm);
    logic [31:0] a, b, sx, zx, res, wval;
    logic [4:0]  dst;
    logic        wr, st;
    a = regs[rs]; b = regs[rt];
    sx = {{16{imm[15]}}, imm}; zx = {16'h0, imm};
    wr = 1'b0; st = 1'b0; dst = rd;
    case (kind)
      0: begin instr = {6'h00, rs, rt, rd, 5'd0, 6'h20}; res = a + b; end
      1: begin instr = {6'h00, rs, rt, rd, 5'd0, 6'h22}; res = a - b; end
      2: begin instr = {6'h00, rs, rt, rd, 5'd0, 6'h24}; res = a & b; end
      3: begin instr = {6'h00, rs, rt, rd, 5'd0, 6'h25}; res = a | b; end
      4: begin instr = {6'h00, rs, rt, rd, 5'd0, 6'h2A}; res = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0; end
      5: begin instr = {6'h0D, rs, rt, imm}; res = a | zx; dst = rt; end
      6: begin instr = {6'h23, rs, rt, imm}; res = a + sx; dst = rt; end
      7: begin instr = {6'h2B, rs, rt, imm}; res = a + sx; end
      default: begin instr = {6'h04, rs, rt, imm}; res = a - b; end
    endcase
    // control values from the control summary
    reg_dst = (kind <= 4); alu_src = (kind >= 5 && kind <= 7); mem_to_reg = (kind == 6);
    reg_wr = (kind <= 6); mem_wr = (kind == 7); ext_op = (kind == 6 || kind == 7);
    case (kind)
      0, 6, 7: alu_ctr = 3'b010;
      1, 8:    alu_ctr = 3'b110;
      2:       alu_ctr = 3'b000;
      3, 5:    alu_ctr = 3'b001;
      default: alu_ctr = 3'b111;
    endcase
    wr = reg_wr; st = mem_wr;
    wval = (kind == 6) ? mem[res[7:2] % DW] : res;
    #1;
    checks++;
    if (zero !== (res == 0) || rf_we !== wr || (wr && (rf_waddr !== dst || rf_wdata !== wval))
        || dm_we !== st || (st && (dm_addr !== res || dm_wdata !== b))) begin
      failures++;
      $display("FAIL kind=%0d instr=%h zero=%b we=%b rw=%0d w=%h (exp %0d %h) st=%b adr=%h d=%h",
               kind, instr, zero, rf_we, rf_waddr, rf_wdata, dst, wval, dm_we, dm_addr, dm_wdata);
    end
    @(posedge clk);
    if (wr && dst != 0) regs[dst] = wval;
    if (st) mem[res[7:2] % DW] = b;
    #1;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (regs[i]) regs[i] = '0;
    instr = '0; reg_dst = 0; alu_src = 0; mem_to_reg = 0; reg_wr = 0; mem_wr = 0; ext_op = 0; alu_ctr = 0;
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int i = 0; i < DW; i++) exec(7, 5'd0, 5'd0, 5'd0, 16'(i * 4));   // clear memory
    for (int r = 1; r < 32; r++) exec(5, 5'd0, 5'(r), 5'd0, 16'($urandom)); // load registers
    for (int n = 0; n < 4000; n++) begin
      automatic int kind = $urandom_range(0, 8);
      automatic logic [4:0] rs = 5'($urandom), rt = 5'($urandom), rd = 5'($urandom);
      if (n % 10 == 0) rt = rs;              // equal operands for Zero
      exec(kind, rs, rt, rd, 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
