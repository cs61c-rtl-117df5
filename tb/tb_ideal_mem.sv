// tb_ideal_mem: self-checking test of the ideal memory at its default 256 words.
// Fills the memory, then mixes random writes and combinational reads. Addresses
// carry random low two bits and random upper bits, so the test also checks that
// only bits [9:2] select the word. The model is indexed by (address / 4) mod 256.
module tb_ideal_mem;
  localparam int WORDS = 256;
  logic clk = 1'b0, we;
  logic [31:0] waddr, wdata, raddr, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  ideal_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(logic [31:0] addr);
    return int'((addr / 4) % WORDS);
  endfunction

  task automatic check_read(logic [31:0] addr);
    raddr = addr; #1;
    checks++;
    if (rdata !== model[idx(addr)]) begin
      failures++;
      $display("read %h: %h expected %h", addr, rdata, model[idx(addr)]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 32'(i * 4); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < WORDS; i++) check_read(32'(i * 4));
    // word i at byte address 4*i: the first two words sit at 0x0 and 0x4
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); waddr = $urandom; wdata = $urandom;
      raddr = waddr; #1;
      checks++;
      if (rdata !== model[idx(waddr)]) begin failures++; $display("pre-edge read %h wrong", waddr); end
      @(posedge clk);
      if (we) model[idx(waddr)] = wdata;
      #1;
      check_read({($urandom_range(0, 1) != 0) ? waddr[31:10] : 22'($urandom), waddr[9:2], 2'($urandom)});
      check_read($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
