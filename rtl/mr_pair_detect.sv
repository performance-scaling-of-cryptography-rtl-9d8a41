// mr_pair_detect: finds a multiply low/high pair at the head of the issue
// window so that one two-word-result multiply can execute both.
//
// The two oldest operations in the window are examined. They fuse when the
// older is mul.lo and the younger is mul.hi (or gmul.lo followed by gmul.hi
// for binary-field products) and both name the same two source registers in
// the same order; the low destination then receives the low half and the high
// destination the high half of one product. That rule is the original design's.
//
// This design adds one safety condition: the pair does not fuse when the
// mul.lo destination is one of the sources, because the mul.hi would then
// read the value mul.lo had just written. MR_EN = 0 disables fusion (a
// one-word-result machine). Combinational.
module mr_pair_detect
  import pax_pkg::*;
#(
  parameter bit MR_EN = 1'b1
) (
  input  logic    v0,
  input  srv_op_t op0,   // oldest operation
  input  logic    v1,
  input  srv_op_t op1,   // next operation
  output logic    fuse
);
  logic kind_ok, src_ok, safe;
  always_comb begin
    kind_ok = (op0.op == OP_MULLO  && op1.op == OP_MULHI) ||
              (op0.op == OP_GMULLO && op1.op == OP_GMULHI);
    src_ok  = (op0.rs1 == op1.rs1) && (op0.rs2 == op1.rs2);
    safe    = (op0.rd != op0.rs1) && (op0.rd != op0.rs2);
    fuse    = MR_EN && v0 && v1 && kind_ok && src_ok && safe;
  end
endmodule
