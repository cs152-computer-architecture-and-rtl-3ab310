// single_cycle_cpu: a single-cycle processor for the MIPS subset add, sub,
// ori, lw, sw, beq and j (the ALU also serves R-type and, or and slt).
//
// Every instruction takes exactly one clock (CPI = 1): the fetch unit
// presents the instruction at PC, the control decodes it combinationally,
// the datapath reads registers, computes, reads or writes data memory and
// writes back, and at the rising clock edge the register file, data memory
// and PC all update together. The clock period must cover the slowest
// instruction, lw: PC clock-to-Q, instruction memory, register read, ALU,
// data memory and register setup.
//
// Interface: clk; rst_n, active-low and synchronous, sets PC to RESET_PC
// and clears the registers; imem_we/imem_waddr/imem_wdata load the program
// (hold rst_n low meanwhile). The outputs show, for the instruction of the
// current cycle, its PC, its code, the register write it will perform
// (rf_we, rf_waddr, rf_wdata) and the store it will perform (dm_we,
// dm_addr, dm_wdata); these take effect at the next rising edge.
module single_cycle_cpu #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        dm_we,
  output logic [31:0] dm_addr,
  output logic [31:0] dm_wdata
);
  logic       reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, ext_op;
  logic       npc_sel, jump, equal;
  logic [2:0] alu_ctr;

  ifetch #(.IMEM_WORDS(IMEM_WORDS), .RESET_PC(RESET_PC)) u_ifu (
    .clk        (clk),
    .rst_n      (rst_n),
    .npc_sel    (npc_sel),
    .jump       (jump),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata),
    .pc         (pc),
    .instr      (instr)
  );

  control_unit u_ctl (
    .op         (instr[31:26]),
    .func       (instr[5:0]),
    .equal      (equal),
    .reg_dst    (reg_dst),
    .alu_src    (alu_src),
    .mem_to_reg (mem_to_reg),
    .reg_wr     (reg_wr),
    .mem_wr     (mem_wr),
    .ext_op     (ext_op),
    .npc_sel    (npc_sel),
    .jump       (jump),
    .alu_ctr    (alu_ctr)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .instr      (instr),
    .reg_dst    (reg_dst),
    .alu_src    (alu_src),
    .mem_to_reg (mem_to_reg),
    .reg_wr     (reg_wr & rst_n),
    .mem_wr     (mem_wr & rst_n),
    .ext_op     (ext_op),
    .alu_ctr    (alu_ctr),
    .zero       (equal),
    .rf_we      (rf_we),
    .rf_waddr   (rf_waddr),
    .rf_wdata   (rf_wdata),
    .dm_we      (dm_we),
    .dm_addr    (dm_addr),
    .dm_wdata   (dm_wdata)
  );
endmodule
