// dual_field_mul: word-sized dual-field multiplier producing the full
// two-word product.
//
// mode = 0 gives the unsigned integer product a*b; mode = 1 gives the product
// of a and b as binary polynomials (carry-less multiplication over GF(2)),
// the operation that binary-field elliptic-curve arithmetic is built on. The
// original design assumes such a multiplier with word-sized inputs and says an
// integer multiplier becomes one with minor changes; this design follows that
// idea in the simplest way: one array of W partial products, accumulated by
// addition in integer mode and by exclusive-or in binary mode.
//
// The full 2W-bit product is available as lo (bits W-1:0) and hi (bits
// 2W-1:W), so a caller can drive a single result bus (one-word result,
// mul.lo/mul.hi) or two buses at once (two-word result).
//
// Timing: purely combinational; the enclosing datapath registers the result
// at write-back, giving single-cycle multiply execution (an assumption: the
// original design gives no multiplier latency).
module dual_field_mul #(
  parameter int unsigned W = 32
) (
  input  logic         mode,   // 0: integer, 1: binary field
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] lo,
  output logic [W-1:0] hi
);
  logic [2*W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int i = 0; i < W; i++) begin
      if (b[i]) begin
        if (mode) acc = acc ^ ({{W{1'b0}}, a} << i);
        else      acc = acc + ({{W{1'b0}}, a} << i);
      end
    end
  end
  assign lo = acc[W-1:0];
  assign hi = acc[2*W-1:W];
endmodule
