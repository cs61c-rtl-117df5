// eq_cmp: equality comparator that produces the branch condition.
//
// equal = (a == b). In the datapath a is busA = R[rs] and b is busB = R[rt], so
// equal is the condition that beq tests. It is reported to the control unit, which
// decides whether the branch is taken.
//
// Ports: a[W-1:0], b[W-1:0] in; equal out. Purely combinational.
module eq_cmp #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         equal
);

  assign equal = (a == b);

endmodule
