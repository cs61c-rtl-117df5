// tb_ifetch: self-checking test of the PC and next-address logic. After reset the
// PC must be 0; each cycle it must become PC + 4, or PC + 4 + SignExt(imm16)*4 when
// nPC_sel is 1. Checks the PC after every rising edge and that it is always word
// aligned, and counts one PC update per cycle.
module tb_ifetch;
  logic clk = 1'b0, rst, npc_sel;
  logic [15:0] imm16;
  logic [31:0] pc, model;
  int checks = 0, failures = 0, taken = 0;

  ifetch dut (.clk, .rst, .npc_sel, .imm16, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; npc_sel = 1'b0; imm16 = '0;
    @(posedge clk); #1;
    rst = 1'b0; model = 32'h0;
    checks++; if (pc !== model) begin failures++; $display("reset pc=%h", pc); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      npc_sel = ($urandom_range(0, 3) == 0);
      imm16 = (i % 7 == 0) ? 16'hFFFF : 16'($urandom);
      rst = (i == 1000);
      @(posedge clk);
      if (rst) model = 32'h0;
      else if (npc_sel) begin
        model = model + 32'd4 + {{14{imm16[15]}}, imm16, 2'b00};
        taken++;
      end else model = model + 32'd4;
      #1;
      checks += 2;
      if (pc !== model) begin failures++; $display("cycle %0d: pc=%h expected %h", i, pc, model); end
      if (pc[1:0] !== 2'b00) failures++;
    end
    checks++; if (taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
