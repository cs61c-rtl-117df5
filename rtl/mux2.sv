// mux2: two-input multiplexer of parameterised width.
//
// out = in1 when sel is 1, in0 when sel is 0. The datapath uses it at 5 bits for
// the destination register select (RegDst: Rd on input 1, Rt on input 0) and at 32
// bits for the ALU B operand (ALUSrc), the register write-back value (MemtoReg) and
// the next PC (nPC_sel). Input numbering follows the 0/1 labels of the datapath.
//
// Ports: sel, in0[W-1:0], in1[W-1:0] in; out[W-1:0] out. Purely combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] out
);

  assign out = sel ? in1 : in0;

endmodule
