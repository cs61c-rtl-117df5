// tb_mux2: self-checking test of the two-input multiplexer at 32 bits, with random
// inputs and both select values.
module tb_mux2;
  logic sel;
  logic [31:0] in0, in1, out;
  int checks = 0, failures = 0;

  mux2 #(.W(32)) dut (.sel, .in0, .in1, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      sel = 1'($urandom_range(0, 1)); in0 = $urandom; in1 = $urandom; #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin
        failures++;
        $display("sel=%b in0=%h in1=%h out=%h", sel, in0, in1, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
