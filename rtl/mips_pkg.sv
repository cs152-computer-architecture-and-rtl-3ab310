// mips_pkg: op codes, func codes, ALU encodings and the main-control
// signal bundle shared by the single-cycle processor.
//
// The op and func values are those of the MIPS subset the processor runs
// (add, sub, ori, lw, sw, beq, j). The ALUctr codes follow the ALU control
// truth table (Add 010, Subtract 110, And 000, Or 001, Set-on-less-than
// 111); the ALUop codes are the 3-bit encoding of the main control
// ("R-type" 100, Or 010, Add 000, Subtract 001). The struct is this
// design's own packaging of the main control's outputs.
package mips_pkg;

  // op field, Instruction<31:26>
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // func field, Instruction<5:0>, of R-type instructions
  localparam logic [5:0] FN_ADD = 6'b10_0000;
  localparam logic [5:0] FN_SUB = 6'b10_0010;
  localparam logic [5:0] FN_AND = 6'b10_0100;
  localparam logic [5:0] FN_OR  = 6'b10_0101;
  localparam logic [5:0] FN_SLT = 6'b10_1010;

  // ALUctr<2:0>: operation the ALU performs
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctr_e;

  // ALUop<2:0>: what the main control asks of the local ALU control
  localparam logic [2:0] ALUOP_ADD   = 3'b000;
  localparam logic [2:0] ALUOP_SUB   = 3'b001;
  localparam logic [2:0] ALUOP_OR    = 3'b010;
  localparam logic [2:0] ALUOP_RTYPE = 3'b100;

  // Outputs of the main control
  typedef struct packed {
    logic       reg_dst;    // 1: write Rd, 0: write Rt
    logic       alu_src;    // 1: ALU B input is the extended immediate
    logic       mem_to_reg; // 1: write back the data memory output
    logic       reg_write;  // write the register file
    logic       mem_write;  // write the data memory
    logic       branch;     // beq
    logic       jump;       // j
    logic       ext_op;     // 1: sign-extend imm16, 0: zero-extend
    logic [2:0] alu_op;     // ALUop<2:0>
  } main_ctrl_t;

endpackage
