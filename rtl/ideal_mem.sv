// ideal_mem: word-wide ideal memory, used both as instruction memory and as data
// memory of the single-cycle processor.
//
// The memory is byte-addressed but holds whole 32-bit words, WORDS of them
// (256 by default, 1024 bytes). Word-aligned addresses are assumed, so the two
// low address bits are ignored and the word index is taken from bits
// [log2(WORDS)+1 : 2], i.e. bits [9:2] for 256 words: byte address 0x0 is word 0,
// 0x4 word 1, and so on. Address bits above the index are ignored, so the memory
// repeats through the address space.
//
// "Ideal" means the read is combinational: rdata follows raddr with no clock, like
// the register file. A write stores wdata at waddr on the rising clock edge when
// we is high. The separate read and write addresses are this design's choice: the
// data memory drives both from the same ALU result, the instruction memory uses
// the write port only to load the program.
//
// Ports: clk, we, waddr[31:0], wdata[31:0], raddr[31:0] in; rdata[31:0] out.
module ideal_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned IW = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata,
  input  logic [31:0] raddr,
  output logic [31:0] rdata
);

  logic [31:0] mem_array [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem_array[waddr[IW+1:2]] <= wdata;
  end

  assign rdata = mem_array[raddr[IW+1:2]];

endmodule
