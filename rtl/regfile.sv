// regfile: the register file, 32 registers of 32 bits, two read ports and one
// write port.
//
// Reads are combinational: busA shows register RA and busB register RB after the
// access time, with no clock involved. The write happens on the rising clock edge
// when write enable is high, storing busW in register RW. Register 0 is never
// written and always reads as zero, as MIPS requires; the explicit zero on the read
// side is this design's choice so that register 0 needs no reset.
//
// A rising edge on dmp prints every register to the simulator console, as a
// debugging aid; it changes no register and no output.
//
// Ports: clk, we, dmp, rw/ra/rb[4:0], busw[31:0] in; busa/busb[31:0] out.
// Timing: a value written at a clock edge is visible on the read ports right after
// that edge; a read of the register being written in the same cycle returns the old
// value.
module regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic             dmp,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] busw,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= busw;
  end

  always @(posedge dmp) begin
    for (int r = 0; r < DEPTH; r++)
      $display("R%0d = %h", r, (r == 0) ? '0 : regs[r]);
  end

  assign busa = (ra == '0) ? '0 : regs[ra];
  assign busb = (rb == '0) ? '0 : regs[rb];

endmodule
