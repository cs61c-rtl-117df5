// register_we: N-bit register with write enable, the basic storage element of the
// datapath.
//
// On the rising clock edge the output takes the input if write enable is high and
// holds otherwise. A synchronous active-high reset loads RESET_VALUE; it has
// priority over the write enable. The N-bit width, the write enable and the
// rising-edge clock follow the description of the storage element; the reset
// value parameter is this design's addition so that the same module can serve as
// the program counter.
//
// Ports: clk, rst, we, d[N-1:0] in; q[N-1:0] out. Timing: q changes one clock edge
// after d is presented with we=1.
module register_we #(
  parameter int unsigned N = 32,
  parameter logic [N-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end

endmodule
