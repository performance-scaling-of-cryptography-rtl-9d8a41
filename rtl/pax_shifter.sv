// pax_shifter: word-wide shifter and rotator.
//
// Logical shift left/right and rotate left/right of the whole word by an
// amount of 0..W-1 (only the low log2(W) bits of amt are used). The caller
// takes the amount either from a register (variable rotate) or from the
// instruction (fixed rotate), the two forms the ciphers use. The original design
// only names the shifter; the operation set is this design's choice.
// Combinational.
module pax_shifter
  import pax_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  sh_op_e       op,
  input  logic [W-1:0] a,
  input  logic [6:0]   amt,
  output logic [W-1:0] y
);
  localparam int unsigned SW = $clog2(W);
  logic [SW-1:0]  s;
  logic [2*W-1:0] dbl;
  assign s = amt[SW-1:0];
  always_comb begin
    dbl = '0;
    unique case (op)
      SH_SLL: y = a << s;
      SH_SRL: y = a >> s;
      SH_ROL: begin dbl = {a, a} << s; y = dbl[2*W-1:W]; end
      SH_ROR: begin dbl = {a, a} >> s; y = dbl[W-1:0];   end
      default: y = '0;
    endcase
  end
endmodule
