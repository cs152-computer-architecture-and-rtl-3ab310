// main_control: decodes the 6-bit op field into the datapath's control
// signals, organised as a PLA.
//
// The AND plane has one product term per instruction, each matching all
// six op bits: R-type (00 0000), ori (00 1101), lw (10 0011), sw (10 1011),
// beq (00 0100) and jump (00 0010). The OR plane combines them:
//   RegWrite = R-type + ori + lw     ALUSrc   = ori + lw + sw
//   RegDst   = R-type                MemtoReg = lw
//   MemWrite = sw                    Branch   = beq
//   Jump     = jump                  ExtOp    = lw + sw
//   ALUop<2> = R-type   ALUop<1> = ori   ALUop<0> = beq
// The "don't care" entries of the truth table come out as 0, and an op code
// outside the six gives all-zero controls (no write, PC+4); that last point
// is this design's choice. Purely combinational.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0]  op,
  output main_ctrl_t  ctrl
);
  // AND plane
  logic t_rtype, t_ori, t_lw, t_sw, t_beq, t_jump;

  always_comb begin
    t_rtype = ~op[5] & ~op[4] & ~op[3] & ~op[2] & ~op[1] & ~op[0];
    t_ori   = ~op[5] & ~op[4] &  op[3] &  op[2] & ~op[1] &  op[0];
    t_lw    =  op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] &  op[0];
    t_sw    =  op[5] & ~op[4] &  op[3] & ~op[2] &  op[1] &  op[0];
    t_beq   = ~op[5] & ~op[4] & ~op[3] &  op[2] & ~op[1] & ~op[0];
    t_jump  = ~op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] & ~op[0];
    // The six op codes are distinct, so at most one term is active.
    a_onehot_terms: assert ($onehot0({t_rtype, t_ori, t_lw, t_sw, t_beq, t_jump}));
  end

  // OR plane
  always_comb begin
    ctrl.reg_write  = t_rtype | t_ori | t_lw;
    ctrl.alu_src    = t_ori | t_lw | t_sw;
    ctrl.reg_dst    = t_rtype;
    ctrl.mem_to_reg = t_lw;
    ctrl.mem_write  = t_sw;
    ctrl.branch     = t_beq;
    ctrl.jump       = t_jump;
    ctrl.ext_op     = t_lw | t_sw;
    ctrl.alu_op     = {t_rtype, t_ori, t_beq};
  end

endmodule
