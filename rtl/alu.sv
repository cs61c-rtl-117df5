// alu: 32-bit arithmetic and logic unit of the datapath.
//
// Computes Result = A op B, where ALUctr selects addition, subtraction or bitwise
// OR: the three operations needed by addu, subu, ori, lw and sw (the memory
// instructions use the adder to form the address). Arithmetic is modulo 2^32, as
// for the unsigned MIPS instructions, so there is no overflow output. The set of
// operations follows the instructions the datapath supports; the ALUctr encoding
// (mips_pkg::alu_ctr_e) is this design's choice. An unused code yields zero.
//
// Ports: alu_ctr, a[31:0], b[31:0] in; result[31:0] out. Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_ctr_e         alu_ctr,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
  end

endmodule
