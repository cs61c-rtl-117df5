// extender: widens the 16-bit immediate of an I-format instruction to 32 bits.
//
// With ExtOp = 0 the upper 16 bits are zero (ZeroExt, used by ori); with ExtOp = 1
// they copy bit 15 (SignExt, used by lw and sw). The two modes and the control
// name ExtOp follow the datapath drawing; the polarity of ExtOp is this design's
// choice.
//
// Ports: ext_op, imm16[15:0] in; imm32[31:0] out. Purely combinational.
module extender (
  input  logic        ext_op,
  input  logic [15:0] imm16,
  output logic [31:0] imm32
);

  assign imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
