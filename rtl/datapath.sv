// datapath: the execution part of the single-cycle processor.
//
// From the instruction fields rs <25:21>, rt <20:16>, rd <15:11> and
// imm16 <15:0> it reads R[rs] (busA) and R[rt] (busB), feeds the ALU with
// busA and either busB (ALUSrc = 0) or the extended immediate
// (ALUSrc = 1), and uses the ALU result as the data memory address. The
// value written back (busW) is the ALU result (MemtoReg = 0) or the data
// memory output (MemtoReg = 1), into Rd (RegDst = 1) or Rt (RegDst = 0).
// Store data (Data In) is busB. Everything is combinational between the
// register file and data memory, whose writes land at the rising clock
// edge, so each instruction completes in one cycle. The mux input numbering
// follows the processor's datapath drawing. The write-back and store nets
// are also brought out as outputs so execution can be observed.
module datapath #(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] instr,
  input  logic        reg_dst,
  input  logic        alu_src,
  input  logic        mem_to_reg,
  input  logic        reg_wr,
  input  logic        mem_wr,
  input  logic        ext_op,
  input  logic [2:0]  alu_ctr,
  output logic        zero,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        dm_we,
  output logic [31:0] dm_addr,
  output logic [31:0] dm_wdata
);
  logic [4:0]  rs, rt, rd, rw;
  logic [15:0] imm16;
  logic [31:0] bus_a, bus_b, bus_w, imm32, alu_b, alu_out, mem_out;

  always_comb begin
    rs    = instr[25:21];
    rt    = instr[20:16];
    rd    = instr[15:11];
    imm16 = instr[15:0];
    rw    = reg_dst ? rd : rt;            // RegDst mux: 1 = Rd, 0 = Rt
    alu_b = alu_src ? imm32 : bus_b;      // ALUSrc mux: 1 = Extender, 0 = busB
    bus_w = mem_to_reg ? mem_out : alu_out; // MemtoReg mux: 1 = memory, 0 = ALU
  end

  register_file #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (reg_wr),
    .rw    (rw),
    .bus_w (bus_w),
    .ra    (rs),
    .rb    (rt),
    .bus_a (bus_a),
    .bus_b (bus_b)
  );

  extender u_ext (
    .imm16  (imm16),
    .ext_op (ext_op),
    .imm32  (imm32)
  );

  alu #(.WIDTH(32)) u_alu (
    .a       (bus_a),
    .b       (alu_b),
    .alu_ctr (alu_ctr),
    .result  (alu_out),
    .zero    (zero)
  );

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk      (clk),
    .wr_en    (mem_wr),
    .adr      (alu_out),
    .data_in  (bus_b),
    .data_out (mem_out)
  );

  always_comb begin
    rf_we    = reg_wr;
    rf_waddr = rw;
    rf_wdata = bus_w;
    dm_we    = mem_wr;
    dm_addr  = alu_out;
    dm_wdata = bus_b;
  end
endmodule
