// tb_register_we: self-checking test of register_we at its default 32-bit width.
// Drives random data with random write enables and resets, and compares q after
// every rising edge with a model register kept in the testbench.
module tb_register_we;
  localparam int N = 32;
  logic clk = 1'b0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0;

  register_we #(.N(N), .RESET_VALUE(32'h0000_0040)) dut (.clk, .rst, .we, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; d = '0;
    @(posedge clk); #1;
    model = 32'h0000_0040;
    checks++; if (q !== model) begin failures++; $display("reset: q=%h", q); end
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 19) == 0);
      we  = 1'($urandom_range(0, 1));
      d   = $urandom;
      @(posedge clk);
      if (rst) model = 32'h0000_0040;
      else if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: rst=%b we=%b d=%h q=%h expected %h", i, rst, we, d, q, model);
      end
      // hold: q must not change between edges
      d = ~d; #1;
      checks++; if (q !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
