// tb_datapath: self-checking test of the datapath on its own. The testbench plays
// the control unit (its own decode table), the instruction memory and the data
// memory, and runs a random program of addu, subu, ori, lw, sw and beq. Every cycle
// it compares the PC, the register write (Rw, busW), the data memory address and
// data of stores, and the Equal output with the instruction-level reference model.
module tb_datapath;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int WORDS = 256;
  localparam int CYCLES = 3000;

  logic clk = 1'b0, rst;
  ctrl_t ctrl;
  logic [31:0] instr, dmem_rdata, pc, dmem_addr, dmem_wdata, busw;
  logic [4:0] rw;
  logic equal;

  logic [31:0] prog [WORDS];
  logic [31:0] dmem [WORDS];
  logic [31:0] ref_r [32];
  logic [31:0] ref_m [];
  logic [31:0] ref_pc;
  int checks = 0, failures = 0;
  int n_taken = 0, n_store = 0, n_load = 0;

  datapath dut (.clk, .rst, .dump(1'b0), .ctrl, .instr, .dmem_rdata, .pc, .equal, .dmem_addr,
                .dmem_wdata, .rw, .busw);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 400) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // testbench-side control and memories
  always_comb begin
    instr = prog[pc[9:2]];
    dmem_rdata = dmem[dmem_addr[9:2]];
    ctrl = '{npc_sel: 1'b0, reg_dst: 1'b0, reg_wr: 1'b0, ext_op: 1'b0,
             alu_src: 1'b0, alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0};
    case (instr[31:26])
      6'h00: if (instr[5:0] inside {6'h21, 6'h23}) begin
               ctrl.reg_dst = 1'b1; ctrl.reg_wr = 1'b1;
               ctrl.alu_ctr = (instr[5:0] == 6'h21) ? ALU_ADD : ALU_SUB;
             end
      6'h0D: begin ctrl.reg_wr = 1'b1; ctrl.alu_src = 1'b1; ctrl.alu_ctr = ALU_OR; end
      6'h23: begin ctrl.reg_wr = 1'b1; ctrl.alu_src = 1'b1; ctrl.ext_op = 1'b1; ctrl.mem_to_reg = 1'b1; end
      6'h2B: begin ctrl.mem_wr = 1'b1; ctrl.alu_src = 1'b1; ctrl.ext_op = 1'b1; end
      6'h04: ctrl.npc_sel = equal;
      default: ;
    endcase
  end

  always_ff @(posedge clk) if (ctrl.mem_wr) dmem[dmem_addr[9:2]] <= dmem_wdata;

  function automatic logic [31:0] rand_instr();
    int rs = $urandom_range(0, 31), rt = $urandom_range(0, 31), rd = $urandom_range(0, 31);
    logic [15:0] imm = 16'($urandom);
    case ($urandom_range(0, 6))
      0: return enc_addu(rd, rs, rt);
      1: return enc_subu(rd, rs, rt);
      2: return enc_ori(rt, rs, imm);
      3: return enc_lw(rt, rs, imm);
      4: return enc_sw(rt, rs, imm);
      5: return enc_beq(rs, ($urandom_range(0, 1) != 0) ? rs : rt, 16'($urandom_range(0, 8)));
      default: return enc_ori(rt, 0, imm);
    endcase
  endfunction

  initial begin
    effect_t e;
    ref_m = new[WORDS];
    for (int i = 0; i < WORDS; i++) begin
      prog[i] = rand_instr();
      dmem[i] = $urandom;
      ref_m[i] = dmem[i];
    end
    // registers start unknown: write every one first
    for (int i = 1; i < 32; i++) prog[i - 1] = enc_ori(i, 0, 16'($urandom));
    ref_r[0] = '0;
    rst = 1'b1;
    @(posedge clk); #1; rst = 1'b0;
    ref_pc = 32'h0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      checks++;
      if (pc !== ref_pc) begin
        failures++; $display("cycle %0d: pc=%h expected %h", c, pc, ref_pc);
        ref_pc = pc;
      end
      if (instr[31:26] == 6'h04) begin
        checks++;
        if (equal !== (((instr[25:21] == 0) ? 32'h0 : ref_r[instr[25:21]]) ==
                       ((instr[20:16] == 0) ? 32'h0 : ref_r[instr[20:16]]))) begin
          failures++; $display("cycle %0d: Equal wrong", c);
        end
      end
      e = step(ref_pc, instr, ref_r, ref_m, WORDS - 1);
      if (e.reg_we) begin
        checks += 2;
        if (rw !== e.reg_dst) begin failures++; $display("cycle %0d: Rw=%0d expected %0d", c, rw, e.reg_dst); end
        if (busw !== e.reg_val) begin failures++; $display("cycle %0d: busW=%h expected %h (instr %h)", c, busw, e.reg_val, instr); end
      end
      if (e.mem_we) begin
        checks += 2;
        if (dmem_addr !== e.mem_addr) begin failures++; $display("cycle %0d: store addr %h expected %h", c, dmem_addr, e.mem_addr); end
        if (dmem_wdata !== e.mem_val) begin failures++; $display("cycle %0d: store data %h expected %h", c, dmem_wdata, e.mem_val); end
      end
      if (e.branch_taken) n_taken++;
      if (e.mem_we) n_store++;
      if (e.is_load) n_load++;
      ref_pc = e.next_pc;
    end
    $display("branches taken=%0d stores=%0d loads=%0d", n_taken, n_store, n_load);
    checks += 3;
    if (n_taken == 0) failures++;
    if (n_store == 0) failures++;
    if (n_load == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
