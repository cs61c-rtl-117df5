// mips_pkg: types and constants shared by the single-cycle MIPS-subset processor.
//
// The processor executes six instructions: addu and subu (R-format), ori, lw, sw
// and beq (I-format). The field layout (op 31:26, rs 25:21, rt 20:16, rd 15:11,
// shamt 10:6, funct 5:0; immediate 15:0) is the standard MIPS one used by the
// design. The numeric opcode and funct values are the standard MIPS encodings;
// the 2-bit ALUctr code below is this design's own choice, since the control
// encoding is left to the control unit.
package mips_pkg;

  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // Function codes of the R-format instructions (instruction bits 5:0)
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;

  // ALU operation select (ALUctr)
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // Instruction fields
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
    logic [5:0]  funct;
  } rtype_t;

  // Control points of the datapath, named as in the datapath drawing
  typedef struct packed {
    logic     npc_sel;    // 1: PC <- PC + 4 + SignExt(imm16)*4, 0: PC <- PC + 4
    logic     reg_dst;    // 1: write register is Rd, 0: Rt
    logic     reg_wr;     // register file write enable
    logic     ext_op;     // 1: sign-extend imm16, 0: zero-extend
    logic     alu_src;    // 1: ALU B input is the extended immediate, 0: busB
    alu_ctr_e alu_ctr;    // ALU operation
    logic     mem_wr;     // data memory write enable
    logic     mem_to_reg; // 1: busW is the data memory output, 0: the ALU result
  } ctrl_t;

endpackage
