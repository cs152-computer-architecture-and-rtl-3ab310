// inst_mem: instruction memory of the fetch unit.
//
// The 32-bit word at byte address adr appears on instr combinationally, so
// the instruction is available in the cycle its PC is issued. A separate
// load port (we, waddr, wdata), written at the rising clock edge, fills the
// memory with a program before it runs; the load port and the size (WORDS)
// are this design's choices. Address bits 1:0 are ignored and addresses
// wrap modulo the memory size.
module inst_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata,
  input  logic [31:0] adr,
  output logic [31:0] instr
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign instr = mem[adr[AW+1:2]];
endmodule
