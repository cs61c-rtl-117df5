// tb_single_cycle_cpu: end-to-end test of the single-cycle processor at its default
// size (256-word instruction and data memories), with no parameter overridden.
//
// The program is loaded through the instruction-memory load port while reset is
// held. It starts with a directed part (register setup, a counted loop closed by a
// backward beq, a store followed by a load of the same word, a write to $0, an
// unsupported instruction) and fills the rest of the memory with random addu,
// subu, ori, lw, sw and beq. Register and data memory contents start arbitrary, so
// the reference model copies the data memory's initial contents and the program
// writes every register before use.
//
// Every cycle the testbench compares the PC, the register write and the memory
// write with an instruction-level reference model, which also checks that exactly
// one instruction completes per clock cycle (CPI = 1). It counts how often each
// instruction and each mechanism occurred (branch taken forward and backward, branch
// not taken, load of a word stored earlier, write to $0 discarded, unsupported
// instruction as no-op) and fails if any never occurred.
module tb_single_cycle_cpu;
  import mips_tb_pkg::*;

  localparam int WORDS = 256;
  localparam int CYCLES = 5000;

  logic clk = 1'b0, rst, dump = 1'b0;
  logic imem_load_we;
  logic [31:0] imem_load_addr, imem_load_data;
  logic [31:0] pc, instr, bus_w, mem_addr, mem_wdata;
  logic reg_wr, mem_wr;
  logic [4:0] reg_rw;

  logic [31:0] prog [WORDS];
  logic [31:0] ref_r [32];
  logic [31:0] ref_m [];
  logic        stored [WORDS];
  logic [31:0] ref_pc;
  int checks = 0, failures = 0;
  int n_addu = 0, n_subu = 0, n_ori = 0, n_lw = 0, n_sw = 0;
  int n_beq_taken_fwd = 0, n_beq_taken_bwd = 0, n_beq_not_taken = 0;
  int n_load_after_store = 0, n_r0_write = 0, n_noop = 0;

  single_cycle_cpu dut (.clk, .rst, .dump, .imem_load_we, .imem_load_addr, .imem_load_data,
                        .pc, .instr, .reg_wr, .reg_rw, .bus_w, .mem_wr, .mem_addr,
                        .mem_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + WORDS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_instr();
    int rs = $urandom_range(0, 31), rt = $urandom_range(0, 31), rd = $urandom_range(0, 31);
    logic [15:0] imm = 16'($urandom);
    case ($urandom_range(0, 7))
      0: return enc_addu(rd, rs, rt);
      1: return enc_subu(rd, rs, rt);
      2: return enc_ori(rt, rs, imm);
      3: return enc_lw(rt, 0, 16'($urandom_range(0, 15) * 4));
      4: return enc_sw(rt, 0, 16'($urandom_range(0, 15) * 4));
      5: return enc_lw(rt, rs, imm);
      6: return enc_sw(rt, rs, imm);
      default: return enc_beq(rs, ($urandom_range(0, 1) != 0) ? rs : rt, 16'($urandom_range(0, 6)));
    endcase
  endfunction

  initial begin
    effect_t e;
    int n;
    ref_m = new[WORDS];
    for (int i = 0; i < WORDS; i++) begin
      prog[i] = rand_instr();
      stored[i] = 1'b0;
    end
    n = 0;
    // every register gets a known value
    for (int i = 1; i < 32; i++) prog[n++] = enc_ori(i, 0, 16'($urandom));
    // counted loop: $1 = 5, $2 = 1; loop: $1 = $1 - $2; beq $1,$0,+1; beq $0,$0,loop
    prog[n++] = enc_ori(1, 0, 16'd5);
    prog[n++] = enc_ori(2, 0, 16'd1);
    prog[n++] = enc_subu(1, 1, 2);
    prog[n++] = enc_beq(1, 0, 16'd1);
    prog[n++] = enc_beq(0, 0, 16'hFFFD);
    // store then load the same word through a base register; $3 = 0x100
    prog[n++] = enc_ori(3, 0, 16'h0100);
    prog[n++] = enc_ori(4, 0, 16'hBEEF);
    prog[n++] = enc_sw(4, 3, 16'hFFF8);
    prog[n++] = enc_lw(5, 3, 16'hFFF8);
    prog[n++] = enc_addu(6, 5, 4);
    // a write to $0 is discarded; reading it back gives 0
    prog[n++] = enc_ori(0, 0, 16'h1234);
    prog[n++] = enc_addu(7, 0, 0);
    // an unsupported instruction (sll $0,$0,0, the usual nop) does nothing
    prog[n++] = 32'h0000_0000;

    // load the program while reset is held
    rst = 1'b1; imem_load_we = 1'b0; imem_load_addr = '0; imem_load_data = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      imem_load_we = 1'b1; imem_load_addr = 32'(i * 4); imem_load_data = prog[i];
    end
    @(negedge clk); imem_load_we = 1'b0;
    // data memory contents are arbitrary at power-up; the model starts from them
    for (int i = 0; i < WORDS; i++) ref_m[i] = dut.u_dmem.mem_array[i];
    ref_r[0] = '0;
    @(posedge clk); #1; rst = 1'b0;
    checks++; if (pc !== 32'h0) begin failures++; $display("pc after reset = %h", pc); end
    ref_pc = 32'h0;

    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      checks += 2;
      if (pc !== ref_pc) begin
        failures++; $display("cycle %0d: pc=%h expected %h", c, pc, ref_pc);
        ref_pc = pc;
      end
      if (instr !== prog[(ref_pc >> 2) % WORDS]) begin
        failures++; $display("cycle %0d: instr=%h expected %h", c, instr, prog[(ref_pc >> 2) % WORDS]);
      end
      e = step(ref_pc, instr, ref_r, ref_m, WORDS - 1);

      // register write port
      checks++;
      if ((reg_wr && reg_rw != 0) !== e.reg_we) begin
        failures++; $display("cycle %0d: register write %b expected %b (instr %h)", c, reg_wr, e.reg_we, instr);
      end
      if (e.reg_we) begin
        checks += 2;
        if (reg_rw !== e.reg_dst) begin failures++; $display("cycle %0d: Rw=%0d expected %0d", c, reg_rw, e.reg_dst); end
        if (bus_w !== e.reg_val) begin failures++; $display("cycle %0d: busW=%h expected %h (instr %h)", c, bus_w, e.reg_val, instr); end
      end
      // data memory write port
      checks++;
      if (mem_wr !== e.mem_we) begin failures++; $display("cycle %0d: MemWr=%b expected %b", c, mem_wr, e.mem_we); end
      if (e.mem_we) begin
        checks += 2;
        if (mem_addr !== e.mem_addr) begin failures++; $display("cycle %0d: store addr %h expected %h", c, mem_addr, e.mem_addr); end
        if (mem_wdata !== e.mem_val) begin failures++; $display("cycle %0d: store data %h expected %h", c, mem_wdata, e.mem_val); end
      end

      // what happened this cycle
      case (instr[31:26])
        6'h00: if (instr[5:0] == 6'h21) n_addu++;
               else if (instr[5:0] == 6'h23) n_subu++;
               else n_noop++;
        6'h0D: n_ori++;
        6'h23: begin
          n_lw++;
          if (stored[(e.load_addr >> 2) % WORDS]) n_load_after_store++;
        end
        6'h2B: begin n_sw++; stored[(e.mem_addr >> 2) % WORDS] = 1'b1; end
        6'h04: begin
          if (e.branch_taken && $signed(e.next_pc - ref_pc) > 0) n_beq_taken_fwd++;
          if (e.branch_taken && $signed(e.next_pc - ref_pc) <= 0) n_beq_taken_bwd++;
          if (e.branch_not_taken) n_beq_not_taken++;
        end
        default: n_noop++;
      endcase
      if (instr[31:26] inside {6'h00, 6'h0D, 6'h23} && reg_wr && reg_rw == 0) n_r0_write++;
      ref_pc = e.next_pc;
    end

    // print the final register file once
    dump = 1'b1; #1 dump = 1'b0;

    // the final data memory must match the model word for word
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (dut.u_dmem.mem_array[i] !== ref_m[i]) begin
        failures++; $display("final dmem word %0d = %h expected %h", i, dut.u_dmem.mem_array[i], ref_m[i]);
      end
    end

    $display("executed %0d instructions in %0d cycles", CYCLES, CYCLES);
    $display("addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq taken fwd=%0d bwd=%0d not taken=%0d",
             n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken_fwd, n_beq_taken_bwd, n_beq_not_taken);
    $display("load of stored word=%0d write to $0 discarded=%0d no-op=%0d",
             n_load_after_store, n_r0_write, n_noop);
    checks += 11;
    if (n_addu == 0) begin failures++; $display("addu never executed"); end
    if (n_subu == 0) begin failures++; $display("subu never executed"); end
    if (n_ori == 0) begin failures++; $display("ori never executed"); end
    if (n_lw == 0) begin failures++; $display("lw never executed"); end
    if (n_sw == 0) begin failures++; $display("sw never executed"); end
    if (n_beq_taken_fwd == 0) begin failures++; $display("no forward branch taken"); end
    if (n_beq_taken_bwd == 0) begin failures++; $display("no backward branch taken"); end
    if (n_beq_not_taken == 0) begin failures++; $display("no branch fell through"); end
    if (n_load_after_store == 0) begin failures++; $display("no load of a stored word"); end
    if (n_r0_write == 0) begin failures++; $display("no write to $0"); end
    if (n_noop == 0) begin failures++; $display("no unsupported instruction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
