// ifetch: instruction fetch unit of the single-cycle processor.
//
// The PC register holds a word address: its two low bits are always 00.
// The instruction memory returns Instruction<31:0> for the current PC in
// the same cycle. At each rising clock edge the PC takes one of:
//   PC + 4                                  normally,
//   PC + 4 + SignExt(imm16) * 4             when nPC_sel is 1 (taken beq),
//   {(PC + 4)<31:28>, target<25:0>, 00}     when Jump is 1 (j).
// imm16 and target are taken from the fetched instruction itself. The
// jump path and its priority over nPC_sel, the synchronous active-low
// reset to RESET_PC and the program-load port of the instruction memory
// are this design's choices.
module ifetch #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npc_sel,
  input  logic        jump,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr
);
  logic [31:2] pc_q, pc_next, pc_plus4, br_target, j_target;
  logic [31:2] offset;

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata),
    .adr   (pc),
    .instr (instr)
  );

  always_comb begin
    pc        = {pc_q, 2'b00};
    offset    = {{14{instr[15]}}, instr[15:0]};   // SignExt(imm16), in words
    pc_plus4  = pc_q + 30'd1;
    br_target = pc_plus4 + offset;
    j_target  = {pc_plus4[31:28], instr[25:0]};
    if (jump)         pc_next = j_target;
    else if (npc_sel) pc_next = br_target;
    else              pc_next = pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pc_q <= RESET_PC[31:2];
    else        pc_q <= pc_next;
  end
endmodule
