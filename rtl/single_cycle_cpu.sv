// single_cycle_cpu: a single-cycle processor for a MIPS subset (addu, subu, ori,
// lw, sw, beq), built from a control unit, a datapath and two ideal memories.
//
// Each clock cycle executes one complete instruction: the PC addresses the
// instruction memory, the control unit decodes the instruction word and the
// datapath's Equal condition into control points, the datapath reads its
// operands, computes, and reads the data memory, and on the next rising clock edge
// the PC, the destination register and (for sw) the data memory word are updated
// together. CPI is therefore exactly 1 and the clock period is set by the longest
// combinational path (instruction memory, register file, ALU, data memory, back to
// the register file input).
//
// The instruction memory is filled through the imem_load_* port, normally while rst
// is held; this loading port is this design's addition. The remaining outputs make
// the architectural effect of each cycle visible (PC, instruction, register write,
// memory write) for tracing and checking.
//
// A rising edge on dump prints the register file contents (simulation only).
//
// Parameters: MEM_WORDS words in each memory (256, i.e. 1 KiB each), RESET_PC.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256,
  parameter logic [31:0] RESET_PC  = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        dump,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_wr,
  output logic [4:0]  reg_rw,
  output logic [31:0] bus_w,
  output logic        mem_wr,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  ctrl_t       ctrl;
  logic        equal;
  logic [31:0] dmem_rdata;

  ideal_mem #(.WORDS(MEM_WORDS)) u_imem (
    .clk  (clk),
    .we   (imem_load_we),
    .waddr(imem_load_addr),
    .wdata(imem_load_data),
    .raddr(pc),
    .rdata(instr)
  );

  control u_control (
    .op   (instr[31:26]),
    .funct(instr[5:0]),
    .equal(equal),
    .ctrl (ctrl)
  );

  datapath #(.RESET_PC(RESET_PC)) u_datapath (
    .clk       (clk),
    .rst       (rst),
    .dump      (dump),
    .ctrl      (ctrl),
    .instr     (instr),
    .dmem_rdata(dmem_rdata),
    .pc        (pc),
    .equal     (equal),
    .dmem_addr (mem_addr),
    .dmem_wdata(mem_wdata),
    .rw        (reg_rw),
    .busw      (bus_w)
  );

  ideal_mem #(.WORDS(MEM_WORDS)) u_dmem (
    .clk  (clk),
    .we   (ctrl.mem_wr),
    .waddr(mem_addr),
    .wdata(mem_wdata),
    .raddr(mem_addr),
    .rdata(dmem_rdata)
  );

  assign reg_wr = ctrl.reg_wr;
  assign mem_wr = ctrl.mem_wr;

endmodule
