// tb_control: self-checking test of the main decoder. For each of the six
// instructions, with random values in the fields that do not matter and both
// values of Equal, compares every control point with a table written out here;
// any other opcode or funct must write neither register nor memory and not branch.
module tb_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  logic equal;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control dut (.op, .funct, .equal, .ctrl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {npc_sel, reg_dst, reg_wr, ext_op, alu_src, alu_ctr, mem_wr, mem_to_reg}
  // with don't-cares masked out by care
  task automatic expect_ctrl(string name, logic [8:0] exp, logic [8:0] care);
    logic [8:0] got;
    got = {ctrl.npc_sel, ctrl.reg_dst, ctrl.reg_wr, ctrl.ext_op, ctrl.alu_src,
           ctrl.alu_ctr, ctrl.mem_wr, ctrl.mem_to_reg};
    checks++;
    if ((got & care) !== (exp & care)) begin
      failures++;
      $display("%s op=%h funct=%h equal=%b: got %b expected %b (care %b)",
               name, op, funct, equal, got, exp, care);
    end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      equal = 1'($urandom_range(0, 1));
      // addu
      op = 6'h00; funct = 6'h21; #1;
      expect_ctrl("addu", {1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 2'b00, 1'b0, 1'b0}, 9'b1_1_1_0_1_11_1_1);
      // subu
      funct = 6'h23; #1;
      expect_ctrl("subu", {1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 2'b01, 1'b0, 1'b0}, 9'b1_1_1_0_1_11_1_1);
      // ori
      op = 6'h0D; funct = 6'($urandom); #1;
      expect_ctrl("ori", {1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 2'b10, 1'b0, 1'b0}, 9'b1_1_1_1_1_11_1_1);
      // lw
      op = 6'h23; #1;
      expect_ctrl("lw", {1'b0, 1'b0, 1'b1, 1'b1, 1'b1, 2'b00, 1'b0, 1'b1}, 9'b1_1_1_1_1_11_1_1);
      // sw
      op = 6'h2B; #1;
      expect_ctrl("sw", {1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 2'b00, 1'b1, 1'b0}, 9'b1_0_1_1_1_11_1_0);
      // beq: branch exactly when Equal
      op = 6'h04; #1;
      expect_ctrl("beq", {equal, 1'b0, 1'b0, 1'b0, 1'b0, 2'b00, 1'b0, 1'b0}, 9'b1_0_1_0_0_00_1_0);
      // any other opcode, or an R-format funct other than addu/subu
      do op = 6'($urandom); while (op inside {6'h00, 6'h04, 6'h0D, 6'h23, 6'h2B});
      #1;
      expect_ctrl("other-op", 9'b0, 9'b1_0_1_0_0_00_1_0);
      op = 6'h00;
      do funct = 6'($urandom); while (funct inside {6'h21, 6'h23});
      #1;
      expect_ctrl("other-funct", 9'b0, 9'b1_0_1_0_0_00_1_0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
