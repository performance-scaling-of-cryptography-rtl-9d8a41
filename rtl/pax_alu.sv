// pax_alu: word-wide arithmetic and logic unit.
//
// Performs the add/subtract and logical operations that the cipher kernels
// use (add, subtract, and, or, xor, and-not) plus a pass of operand b, used
// for immediates. The original design only names the ALU; the operation list is
// this design's choice, taken from the basic operations the ciphers need.
// Width follows the processor word size. Combinational.
module pax_alu
  import pax_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_ANDN:  y = a & ~b;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
