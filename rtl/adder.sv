// adder: W-bit binary adder, sum = a + b modulo 2^W.
//
// The next-address logic uses two of them: one forms PC + 4, the other adds the
// scaled branch offset to PC + 4. No carry out is needed there.
//
// Ports: a[W-1:0], b[W-1:0] in; sum[W-1:0] out. Purely combinational.
module adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  assign sum = a + b;

endmodule
