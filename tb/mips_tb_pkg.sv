// mips_tb_pkg: testbench helpers for the MIPS-subset processor: instruction
// encoders and an instruction-level reference model. The model executes one
// instruction per call straight from its register transfer (the architectural
// definition), independently of the datapath and control structure under test.
package mips_tb_pkg;

  localparam logic [5:0] T_OP_R   = 6'h00;
  localparam logic [5:0] T_OP_BEQ = 6'h04;
  localparam logic [5:0] T_OP_ORI = 6'h0D;
  localparam logic [5:0] T_OP_LW  = 6'h23;
  localparam logic [5:0] T_OP_SW  = 6'h2B;

  function automatic logic [31:0] enc_addu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, 6'h21};
  endfunction
  function automatic logic [31:0] enc_subu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, 6'h23};
  endfunction
  function automatic logic [31:0] enc_ori(int rt, int rs, logic [15:0] imm);
    return {T_OP_ORI, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] enc_lw(int rt, int rs, logic [15:0] imm);
    return {T_OP_LW, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] enc_sw(int rt, int rs, logic [15:0] imm);
    return {T_OP_SW, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] enc_beq(int rs, int rt, logic [15:0] imm);
    return {T_OP_BEQ, 5'(rs), 5'(rt), imm};
  endfunction

  // Effect of one instruction, as the reference model computes it
  typedef struct {
    logic [31:0] next_pc;
    logic        reg_we;    // a register other than $0 is written
    logic [4:0]  reg_dst;
    logic [31:0] reg_val;
    logic        mem_we;
    logic [31:0] mem_addr;
    logic [31:0] mem_val;
    logic        is_load;
    logic [31:0] load_addr;
    logic        branch_taken;
    logic        branch_not_taken;
  } effect_t;

  // Executes instr at pc on the register state r and word memory m (indexed by
  // byte address bits [9:2] for MEM_WORDS = 256: mask applied by the caller via
  // word_mask). Updates r and m.
  function automatic effect_t step(logic [31:0] pc, logic [31:0] instr,
                                   ref logic [31:0] r [32], ref logic [31:0] m [],
                                   input int word_mask);
    effect_t e;
    logic [5:0]  op    = instr[31:26];
    logic [4:0]  rs    = instr[25:21];
    logic [4:0]  rt    = instr[20:16];
    logic [4:0]  rd    = instr[15:11];
    logic [5:0]  fn    = instr[5:0];
    logic [15:0] imm   = instr[15:0];
    logic [31:0] simm  = {{16{imm[15]}}, imm};
    logic [31:0] a     = (rs == 0) ? 32'h0 : r[rs];
    logic [31:0] b     = (rt == 0) ? 32'h0 : r[rt];
    e = '{default: '0};
    e.next_pc = pc + 32'd4;
    case (op)
      T_OP_R: begin
        if (fn == 6'h21) begin e.reg_dst = rd; e.reg_val = a + b; e.reg_we = 1'b1; end
        if (fn == 6'h23) begin e.reg_dst = rd; e.reg_val = a - b; e.reg_we = 1'b1; end
      end
      T_OP_ORI: begin e.reg_dst = rt; e.reg_val = a | {16'h0, imm}; e.reg_we = 1'b1; end
      T_OP_LW: begin
        e.is_load = 1'b1; e.load_addr = a + simm;
        e.reg_dst = rt; e.reg_val = m[((a + simm) >> 2) & word_mask]; e.reg_we = 1'b1;
      end
      T_OP_SW: begin e.mem_we = 1'b1; e.mem_addr = a + simm; e.mem_val = b; end
      T_OP_BEQ: begin
        if (a == b) begin e.next_pc = pc + 32'd4 + (simm << 2); e.branch_taken = 1'b1; end
        else e.branch_not_taken = 1'b1;
      end
      default: ;
    endcase
    if (e.reg_we && e.reg_dst == 0) e.reg_we = 1'b0;
    if (e.reg_we) r[e.reg_dst] = e.reg_val;
    if (e.mem_we) m[(e.mem_addr >> 2) & word_mask] = e.mem_val;
    return e;
  endfunction

endpackage
