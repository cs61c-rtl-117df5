// control: main decoder of the single-cycle processor.
//
// From the opcode and function field of the current instruction, and the Equal
// condition reported by the datapath, it sets every control point of the datapath
// for that one cycle:
//
//   instr  RegDst RegWr ExtOp ALUSrc ALUctr MemWr MemtoReg nPC_sel
//   addu     1      1     -     0     ADD     0      0        0
//   subu     1      1     -     0     SUB     0      0        0
//   ori      0      1     0     1     OR      0      0        0
//   lw       0      1     1     1     ADD     0      1        0
//   sw       -      0     1     1     ADD     1      -        0
//   beq      -      0     -     0     SUB     0      -      Equal
//
// (- is a don't-care, driven as 0.) Each row follows from the register transfer of
// the instruction; the numeric opcodes and funct codes are the standard MIPS ones.
// Any other instruction writes nothing and falls through to PC + 4, so it behaves
// as a no-op: this is this design's choice.
//
// Ports: op[5:0], funct[5:0], equal in; ctrl (mips_pkg::ctrl_t) out.
// Purely combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       equal,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{npc_sel: 1'b0, reg_dst: 1'b0, reg_wr: 1'b0, ext_op: 1'b0,
             alu_src: 1'b0, alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = ALU_ADD;
        end else if (funct == FN_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = ALU_SUB;
        end
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.alu_ctr    = ALU_ADD;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_ADD;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.alu_ctr = ALU_SUB;
        ctrl.npc_sel = equal;
      end
      default: ;
    endcase
  end

endmodule
