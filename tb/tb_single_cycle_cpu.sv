// tb_single_cycle_cpu: end-to-end test of the single-cycle processor at its
// default sizes.
//
// A program is built here and loaded through the instruction-memory load
// port during reset. It has three parts: stores from register 0 that clear
// the data words the program uses; a directed part (a count-down loop
// with a backward jump and a taken/not-taken beq, loads after stores,
// writes to register 0, sign and zero extension); and a long random part of
// add, sub, and, or, slt, ori, lw, sw, forward beq and forward j. It ends in
// "beq $0,$0,-1", which holds the PC.
//
// A reference model of the instruction set runs in lockstep: each cycle the
// processor's PC, instruction, register write and store must equal the
// model's for that instruction, which also shows one instruction completes
// per clock (CPI = 1). Every instruction kind, both branch outcomes, jumps,
// write-back from memory and the ignored write to register 0 are counted,
// and one that never happened counts as a failure.
module tb_single_cycle_cpu;
  localparam int IW = 1024;     // instruction memory words (design default)
  localparam int DW = 1024;     // data memory words (design default)
  localparam int NDATA = 64;    // data words the program touches
  localparam int NRAND = 700;   // random instructions

  logic        clk = 1'b0, rst_n, imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic [31:0] pc, instr, rf_wdata, dm_addr, dm_wdata;
  logic        rf_we, dm_we;
  logic [4:0]  rf_waddr;

  single_cycle_cpu dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr), .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] prog [IW];
  int          plen = 0;
  logic [31:0] regs [32];
  logic [31:0] mem [DW];
  logic [31:0] mpc;

  // events counted
  int n_add, n_sub, n_and, n_or, n_slt, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_j, n_r0, n_cycles;

  // ---- instruction encoders ----
  function automatic logic [31:0] rtype(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] jtype(input int word_addr);
    return {6'h02, 26'(word_addr)};
  endfunction
  task automatic emit(input logic [31:0] w);
    prog[plen] = w; plen++;
  endtask

  // ---- reference model: one instruction ----
  task automatic model_step(output logic m_we, output logic [4:0] m_rw, output logic [31:0] m_wd,
                            output logic m_st, output logic [31:0] m_adr, output logic [31:0] m_sd);
    logic [31:0] w, a, b, sx, nxt;
    logic [5:0]  op, fn;
    w  = prog[mpc[11:2]];
    op = w[31:26]; fn = w[5:0];
    a  = regs[w[25:21]]; b = regs[w[20:16]];
    sx = {{16{w[15]}}, w[15:0]};
    nxt = mpc + 4;
    m_we = 0; m_rw = 0; m_wd = 0; m_st = 0; m_adr = 0; m_sd = 0;
    case (op)
      6'h00: begin
        m_we = 1; m_rw = w[15:11];
        case (fn)
          6'h20: begin m_wd = a + b; n_add++; end
          6'h22: begin m_wd = a - b; n_sub++; end
          6'h24: begin m_wd = a & b; n_and++; end
          6'h25: begin m_wd = a | b; n_or++; end
          default: begin m_wd = ($signed(a) < $signed(b)) ? 1 : 0; n_slt++; end
        endcase
      end
      6'h0D: begin m_we = 1; m_rw = w[20:16]; m_wd = a | {16'h0, w[15:0]}; n_ori++; end
      6'h23: begin m_we = 1; m_rw = w[20:16]; m_wd = mem[(a + sx) >> 2 & (DW - 1)]; n_lw++; end
      6'h2B: begin m_st = 1; m_adr = a + sx; m_sd = b; n_sw++; end
      6'h04: begin
        if (a == b) begin nxt = nxt + (sx << 2); n_beq_t++; end
        else n_beq_nt++;
      end
      6'h02: begin nxt = {nxt[31:28], w[25:0], 2'b00}; n_j++; end
      default: ;
    endcase
    if (m_we && m_rw != 0) regs[m_rw] = m_wd;
    if (m_we && m_rw == 0) n_r0++;
    if (m_st) mem[(m_adr >> 2) & (DW - 1)] = m_sd;
    mpc = nxt;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int halt_at;
    // ---- build the program ----
    for (int i = 0; i < NDATA; i++) emit(itype(6'h2B, 0, 0, i * 4));        // sw $0, 4i($0)
    // directed part
    emit(itype(6'h0D, 1, 0, 5));              // ori $1,$0,5       loop counter
    emit(itype(6'h0D, 2, 0, 1));              // ori $2,$0,1
    emit(itype(6'h0D, 3, 0, 16'hFFFF));       // ori $3,$0,0xFFFF  zero-extended
    emit(rtype(6'h22, 1, 1, 2));              // loop: sub $1,$1,$2
    emit(rtype(6'h20, 4, 4, 3));              //       add $4,$4,$3
    emit(itype(6'h04, 0, 1, 1));              //       beq $1,$0,+1 (exit)
    emit(jtype(plen - 3));                    //       j loop
    emit(itype(6'h2B, 4, 0, 8));              // sw $4, 8($0)
    emit(itype(6'h23, 5, 0, 8));              // lw $5, 8($0)
    emit(itype(6'h23, 6, 2, -1));             // lw $6, -1($2)  sign-extended offset, word 0
    emit(rtype(6'h2A, 7, 6, 3));              // slt $7,$6,$3
    emit(rtype(6'h20, 0, 3, 3));              // add $0,$3,$3   ignored write
    emit(itype(6'h0D, 28, 0, 64));            // ori $28,$0,64  base register for random part
    // random part; destinations are $8..$27, so $1..$7 and $28 keep their values
    for (int n = 0; n < NRAND; n++) begin
      automatic int k = $urandom_range(0, 99);
      automatic int rs = $urandom_range(0, 27), rt = $urandom_range(0, 27), rd = $urandom_range(8, 27);
      automatic int left = NRAND - n - 1;
      if (k < 40) begin
        automatic logic [5:0] fns [5] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2A};
        emit(rtype(fns[$urandom_range(0, 4)], rd, rs, rt));
      end else if (k < 52) emit(itype(6'h0D, rd, rs, $urandom));
      else if (k < 64) emit(itype(6'h23, rd, ($urandom_range(0, 1) ? 28 : 0), $urandom_range(0, NDATA / 2 - 1) * 4));
      else if (k < 76) emit(itype(6'h2B, rt, ($urandom_range(0, 1) ? 28 : 0), $urandom_range(0, NDATA / 2 - 1) * 4));
      else if (k < 92) begin
        if ($urandom_range(0, 2) == 0) rt = rs;                 // often taken
        emit(itype(6'h04, rt, rs, (left < 3) ? 0 : $urandom_range(0, 3)));
      end else emit(jtype(plen + 1 + ((left < 3) ? 0 : $urandom_range(0, 3))));
    end
    halt_at = plen;
    emit(itype(6'h04, 0, 0, -1));             // halt: beq $0,$0,-1
    if (plen > IW) $fatal(1, "program too long");

    // ---- load it during reset ----
    rst_n = 1'b0; imem_we = 1'b1;
    for (int i = 0; i < plen; i++) begin
      imem_waddr = 32'(i * 4); imem_wdata = prog[i];
      @(posedge clk); #1;
    end
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    #1;

    // ---- lockstep run ----
    foreach (regs[i]) regs[i] = '0;
    mpc = 32'h0;
    n_add = 0; n_sub = 0; n_and = 0; n_or = 0; n_slt = 0; n_ori = 0; n_lw = 0; n_sw = 0;
    n_beq_t = 0; n_beq_nt = 0; n_j = 0; n_r0 = 0; n_cycles = 0;
    while (mpc != 32'(halt_at * 4) && n_cycles < 100000) begin
      logic m_we, m_st;
      logic [4:0] m_rw;
      logic [31:0] m_wd, m_adr, m_sd, m_pc;
      m_pc = mpc;
      model_step(m_we, m_rw, m_wd, m_st, m_adr, m_sd);
      checks++;
      if (pc !== m_pc || instr !== prog[m_pc[11:2]] || rf_we !== m_we
          || (m_we && (rf_waddr !== m_rw || rf_wdata !== m_wd))
          || dm_we !== m_st || (m_st && (dm_addr !== m_adr || dm_wdata !== m_sd))) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d pc=%h (exp %h) instr=%h we=%b rw=%0d wd=%h (exp %b %0d %h) st=%b adr=%h sd=%h (exp %b %h %h)",
                   n_cycles, pc, m_pc, instr, rf_we, rf_waddr, rf_wdata, m_we, m_rw, m_wd,
                   dm_we, dm_addr, dm_wdata, m_st, m_adr, m_sd);
      end
      @(posedge clk); #1;
      n_cycles++;
    end
    // the processor stays on the halt instruction
    repeat (3) begin
      checks++;
      if (pc !== 32'(halt_at * 4)) begin
        failures++;
        $display("FAIL halt: pc=%h", pc);
      end
      @(posedge clk); #1;
    end
    // the loop result reached memory and came back: 5 * 0xFFFF
    checks++;
    if (regs[5] !== 32'd5 * 32'h0000_FFFF) begin
      failures++;
      $display("FAIL directed loop result %h", regs[5]);
    end
    $display("%0d instructions in %0d cycles (CPI = 1)", n_cycles, n_cycles);
    $display("mechanisms:");
    need("add", n_add); need("sub", n_sub); need("and", n_and); need("or", n_or);
    need("slt", n_slt); need("ori", n_ori); need("lw (MemtoReg)", n_lw); need("sw (MemWr)", n_sw);
    need("beq taken", n_beq_t); need("beq not taken", n_beq_nt); need("j", n_j);
    need("write to $0 ignored", n_r0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
