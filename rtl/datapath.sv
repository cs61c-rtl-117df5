// datapath: the single-cycle datapath, everything of the processor except the
// control unit and the two memories.
//
// The instruction word is split into its fields: Rs = <25:21>, Rt = <20:16>,
// Rd = <15:11>, imm16 = <15:0>. Rs and Rt address the two read ports of the
// register file; the RegDst multiplexer picks Rd (R-format) or Rt (I-format) as the
// register to write. busA feeds the ALU directly; the ALUSrc multiplexer gives the
// ALU either busB or the extended immediate (extender, controlled by ExtOp). The
// ALU result is the data memory address and busB the data memory input. The
// MemtoReg multiplexer returns either the ALU result or the data memory output to
// the register file as busW. A comparator reports Equal = (busA == busB) to the
// control unit, which answers with nPC_sel for the instruction fetch unit.
//
// Timing: everything between the PC and the register file is combinational, so one
// instruction completes per cycle. On the rising clock edge the PC, the register
// selected by Rw (if RegWr) and the data memory word (if MemWr, written outside
// this module) are all updated together. The control points come in as one
// mips_pkg::ctrl_t struct.
//
// Ports: clk, rst, dump (register file console dump), ctrl, instr[31:0],
// dmem_rdata[31:0] in; pc[31:0], equal, dmem_addr[31:0], dmem_wdata[31:0],
// rw[4:0], busw[31:0] out (rw and busw show the register write of the current
// cycle).
module datapath
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dump,
  input  ctrl_t       ctrl,
  input  logic [31:0] instr,
  input  logic [31:0] dmem_rdata,
  output logic [31:0] pc,
  output logic        equal,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [4:0]  rw,
  output logic [31:0] busw
);

  logic [4:0]  rs, rt, rd;
  logic [15:0] imm16;
  logic [31:0] busa, busb, imm32, alu_b, alu_result;

  assign rs    = instr[25:21];
  assign rt    = instr[20:16];
  assign rd    = instr[15:11];
  assign imm16 = instr[15:0];

  ifetch #(.RESET_PC(RESET_PC)) u_ifetch (
    .clk    (clk),
    .rst    (rst),
    .npc_sel(ctrl.npc_sel),
    .imm16  (imm16),
    .pc     (pc)
  );

  mux2 #(.W(5)) u_regdst_mux (
    .sel(ctrl.reg_dst),
    .in0(rt),
    .in1(rd),
    .out(rw)
  );

  regfile #(.WIDTH(32), .DEPTH(32)) u_regfile (
    .clk (clk),
    .we  (ctrl.reg_wr),
    .dmp (dump),
    .rw  (rw),
    .busw(busw),
    .ra  (rs),
    .rb  (rt),
    .busa(busa),
    .busb(busb)
  );

  extender u_extender (
    .ext_op(ctrl.ext_op),
    .imm16 (imm16),
    .imm32 (imm32)
  );

  mux2 #(.W(32)) u_alusrc_mux (
    .sel(ctrl.alu_src),
    .in0(busb),
    .in1(imm32),
    .out(alu_b)
  );

  alu #(.WIDTH(32)) u_alu (
    .alu_ctr(ctrl.alu_ctr),
    .a      (busa),
    .b      (alu_b),
    .result (alu_result)
  );

  eq_cmp #(.W(32)) u_eq (
    .a    (busa),
    .b    (busb),
    .equal(equal)
  );

  mux2 #(.W(32)) u_memtoreg_mux (
    .sel(ctrl.mem_to_reg),
    .in0(alu_result),
    .in1(dmem_rdata),
    .out(busw)
  );

  assign dmem_addr  = alu_result;
  assign dmem_wdata = busb;

endmodule
