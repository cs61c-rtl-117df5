// tb_regfile: self-checking test of the 32 x 32-bit register file.
// First writes every register, then runs random mixes of writes and two
// combinational reads, comparing both read ports with a model array. Checks that
// register 0 stays zero, that reads need no clock, and that a write becomes
// visible only after the clock edge.
module tb_regfile;
  logic clk = 1'b0, we, dmp;
  logic [4:0] rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .we, .dmp, .rw, .busw, .ra, .rb, .busa, .busb);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r); #1;
      checks += 2;
      if (busa !== model[r]) begin failures++; $display("busA R%0d=%h expected %h", r, busa, model[r]); end
      if (busb !== model[31-r]) begin failures++; $display("busB R%0d=%h expected %h", 31-r, busb, model[31-r]); end
    end
  endtask

  initial begin
    we = 1'b0; dmp = 1'b0; rw = '0; busw = '0; ra = '0; rb = '0;
    model[0] = '0;
    // fill every register, including an attempt on register 0
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      we = 1'b1; rw = 5'(r); busw = $urandom;
      if (r != 0) model[r] = busw;
    end
    @(negedge clk); we = 1'b0;
    check_reads();
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); rw = 5'($urandom); busw = $urandom;
      ra = rw; rb = 5'($urandom);
      #1;
      // before the edge the old value is still read
      checks++;
      if (busa !== model[ra]) begin failures++; $display("pre-edge read R%0d=%h expected %h", ra, busa, model[ra]); end
      @(posedge clk);
      if (we && rw != 0) model[rw] = busw;
      #1;
      checks += 2;
      if (busa !== model[ra]) begin failures++; $display("post-edge busA R%0d=%h expected %h", ra, busa, model[ra]); end
      if (busb !== model[rb]) begin failures++; $display("post-edge busB R%0d=%h expected %h", rb, busb, model[rb]); end
    end
    we = 1'b0;
    check_reads();
    // console dump of all registers
    #1 dmp = 1'b1; #1 dmp = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
