// tb_alu: self-checking test of the ALU. Applies directed corner values and random
// operands for add, subtract and OR and compares with results computed here.
module tb_alu;
  import mips_pkg::*;
  alu_ctr_e alu_ctr;
  logic [31:0] a, b, result, expected;
  int checks = 0, failures = 0;

  alu dut (.alu_ctr, .a, .b, .result);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(alu_ctr_e op, logic [31:0] x, logic [31:0] y);
    alu_ctr = op; a = x; b = y; #1;
    case (op)
      ALU_ADD: expected = x + y;
      ALU_SUB: expected = x + ~y + 32'd1;
      ALU_OR:  expected = x | y;
      default: expected = '0;
    endcase
    checks++;
    if (result !== expected) begin
      failures++;
      $display("op=%s a=%h b=%h result=%h expected %h", op.name(), x, y, result, expected);
    end
  endtask

  initial begin
    apply(ALU_ADD, 32'hFFFF_FFFF, 32'h1);
    apply(ALU_ADD, 32'h7FFF_FFFF, 32'h1);
    apply(ALU_SUB, 32'h0, 32'h1);
    apply(ALU_SUB, 32'h8000_0000, 32'h1);
    apply(ALU_OR,  32'hF0F0_0000, 32'h0000_0F0F);
    for (int i = 0; i < 3000; i++) begin
      int sel;
      logic [31:0] x, y;
      sel = $urandom_range(0, 2);
      x = $urandom;
      y = $urandom;
      case (sel)
        0: apply(ALU_ADD, x, y);
        1: apply(ALU_SUB, x, y);
        default: apply(ALU_OR, x, y);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
