// tb_adder: self-checking test of the 32-bit adder, including the wrap-around at
// 2^32, against sums computed in 64-bit arithmetic.
module tb_adder;
  logic [31:0] a, b, sum;
  logic [63:0] wide;
  int checks = 0, failures = 0;

  adder #(.W(32)) dut (.a, .b, .sum);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = (i < 10) ? 32'hFFFF_FFFF - 32'(i) : $urandom; #1;
      wide = {32'h0, a} + {32'h0, b};
      checks++;
      if (sum !== wide[31:0]) begin
        failures++;
        $display("a=%h b=%h sum=%h expected %h", a, b, sum, wide[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
