// control_unit: the control of the single-cycle processor. The main
// control decodes op into the datapath controls and a 3-bit ALUop; the
// local ALU control turns ALUop and func into ALUctr. The branch decision
// is nPC_sel = Branch & Equal, where Equal is the ALU's Zero output after
// the subtract that beq performs. Purely combinational: the controls settle
// within the cycle of the instruction they belong to.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  input  logic       equal,
  output logic       reg_dst,
  output logic       alu_src,
  output logic       mem_to_reg,
  output logic       reg_wr,
  output logic       mem_wr,
  output logic       ext_op,
  output logic       npc_sel,
  output logic       jump,
  output logic [2:0] alu_ctr
);
  main_ctrl_t ctrl;

  main_control u_main (
    .op   (op),
    .ctrl (ctrl)
  );

  alu_control u_alu_ctl (
    .alu_op  (ctrl.alu_op),
    .func    (func),
    .alu_ctr (alu_ctr)
  );

  always_comb begin
    reg_dst    = ctrl.reg_dst;
    alu_src    = ctrl.alu_src;
    mem_to_reg = ctrl.mem_to_reg;
    reg_wr     = ctrl.reg_write;
    mem_wr     = ctrl.mem_write;
    ext_op     = ctrl.ext_op;
    jump       = ctrl.jump;
    npc_sel    = ctrl.branch & equal;
  end
endmodule
