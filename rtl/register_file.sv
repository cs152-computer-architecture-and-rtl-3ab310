// register_file: 32 registers of 32 bits with two read ports and one write
// port, the "32 32-bit Registers" block of the single-cycle datapath.
//
// Reads are combinational: ra selects busA and rb selects busB in the same
// cycle. A write of bus_w into register rw happens at the rising clock edge
// when we (RegWr) is 1, so a read of the register being written shows the
// old value until the edge. Register 0 always reads 0 and ignores writes,
// as in the MIPS architecture, and reset clears every register; both are
// this design's choices, as is the rising edge.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [WIDTH-1:0]         bus_w,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  output logic [WIDTH-1:0]         bus_a,
  output logic [WIDTH-1:0]         bus_b
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end
endmodule
