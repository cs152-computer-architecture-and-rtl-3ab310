// data_mem: word-wide data memory of the single-cycle datapath.
//
// The word at byte address adr appears on data_out combinationally, within
// the cycle, so a load completes in one clock. When wr_en (MemWr) is 1,
// data_in is written to that word at the rising clock edge. Accesses are
// whole words: address bits 1:0 are ignored and addresses wrap modulo the
// memory size. The size (WORDS) is this design's choice; the contents are
// not reset.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= data_in;
  end

  assign data_out = mem[widx];
endmodule
