// ifetch: program counter and next-address logic of the instruction fetch unit.
//
// The PC holds a word address: its two low bits are always 00, so only bits 31:2
// are stored (a 30-bit register_we). Every cycle one adder forms PC + 4; a second
// adder forms PC + 4 + SignExt(imm16)*4 (the "PC Ext" step sign-extends the word
// offset and shifts it left by two). nPC_sel picks the branch target (1) or PC + 4
// (0), and the choice is loaded into the PC on the next rising clock edge. The PC is written every cycle; reset, synchronous and
// active high, sets it to RESET_PC (0 by default, this design's choice).
//
// Ports: clk, rst, npc_sel, imm16[15:0] in; pc[31:0] out (the instruction address).
module ifetch #(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic [15:0] imm16,
  output logic [31:0] pc
);

  logic [29:0] pc_word;
  logic [31:0] pc_plus4, br_offset, br_target, next_pc;

  assign pc = {pc_word, 2'b00};

  adder #(.W(32)) u_inc (
    .a  (pc),
    .b  (32'd4),
    .sum(pc_plus4)
  );

  // PC Ext: the offset counts words, so sign-extend it and multiply by 4
  assign br_offset = {{14{imm16[15]}}, imm16, 2'b00};

  adder #(.W(32)) u_br_add (
    .a  (pc_plus4),
    .b  (br_offset),
    .sum(br_target)
  );

  mux2 #(.W(32)) u_npc_mux (
    .sel(npc_sel),
    .in0(pc_plus4),
    .in1(br_target),
    .out(next_pc)
  );

  register_we #(.N(30), .RESET_VALUE(RESET_PC[31:2])) u_pc (
    .clk(clk),
    .rst(rst),
    .we (1'b1),
    .d  (next_pc[31:2]),
    .q  (pc_word)
  );

endmodule
