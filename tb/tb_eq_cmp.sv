// tb_eq_cmp: self-checking test of the equality comparator with equal operands,
// operands that differ in one bit, and random operands.
module tb_eq_cmp;
  logic [31:0] a, b;
  logic equal;
  int checks = 0, failures = 0;

  eq_cmp #(.W(32)) dut (.a, .b, .equal);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x, logic [31:0] y, logic exp);
    a = x; b = y; #1;
    checks++;
    if (equal !== exp) begin
      failures++;
      $display("a=%h b=%h equal=%b expected %b", x, y, equal, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [31:0] v;
      v = $urandom;
      apply(v, v, 1'b1);
      apply(v, v ^ (32'h1 << (i % 32)), 1'b0);
      apply(v, $urandom, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
