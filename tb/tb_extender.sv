// tb_extender: self-checking test of the immediate extender in both modes,
// exhaustively over all 65536 immediates.
module tb_extender;
  logic ext_op;
  logic [15:0] imm16;
  logic [31:0] imm32, expected;
  int checks = 0, failures = 0;

  extender dut (.ext_op, .imm16, .imm32);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 65536; v++) begin
        ext_op = e[0]; imm16 = 16'(v); #1;
        expected = (e == 1) ? 32'(signed'(imm16)) : {16'h0, imm16};
        checks++;
        if (imm32 !== expected) begin
          failures++;
          if (failures < 10) $display("ext_op=%0d imm16=%h imm32=%h expected %h", e, imm16, imm32, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
