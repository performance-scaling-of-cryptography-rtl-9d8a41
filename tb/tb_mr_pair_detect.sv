// tb_mr_pair_detect: exhaustive-ish test of the multiply-pair fusion rule.
// Random operation pairs with a small register range (so that matches are
// frequent) are compared against the rule restated in the testbench, for
// both MR_EN = 1 and MR_EN = 0. Counts that fusing and non-fusing cases both
// occurred.
module tb_mr_pair_detect;
  import pax_pkg::*;
  int checks = 0, failures = 0, fused = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    v0, v1, f_on, f_off;
  srv_op_t o0, o1;
  mr_pair_detect #(.MR_EN(1'b1)) d_on  (.v0, .op0(o0), .v1, .op1(o1), .fuse(f_on));
  mr_pair_detect #(.MR_EN(1'b0)) d_off (.v0, .op0(o0), .v1, .op1(o1), .fuse(f_off));

  function automatic op_e rnd_op();
    op_e l [6] = '{OP_MULLO, OP_MULHI, OP_GMULLO, OP_GMULHI, OP_ADD, OP_XOR};
    return l[$urandom % 6];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic exp;
      o0 = '{op: rnd_op(), rd: 5'($urandom % 4), rs1: 5'($urandom % 4),
             rs2: 5'($urandom % 4), imm: $urandom};
      o1 = '{op: rnd_op(), rd: 5'($urandom % 4), rs1: 5'($urandom % 4),
             rs2: 5'($urandom % 4), imm: $urandom};
      if (n % 3 == 0) begin o1.rs1 = o0.rs1; o1.rs2 = o0.rs2; end
      v0 = ($urandom % 8) != 0;
      v1 = ($urandom % 8) != 0;
      #1;
      exp = v0 && v1 &&
            ((o0.op == OP_MULLO && o1.op == OP_MULHI) ||
             (o0.op == OP_GMULLO && o1.op == OP_GMULHI)) &&
            o0.rs1 == o1.rs1 && o0.rs2 == o1.rs2 &&
            o0.rd != o0.rs1 && o0.rd != o0.rs2;
      if (exp) fused++;
      checks += 2;
      if (f_on !== exp) begin failures++; $display("FAIL fuse got %b exp %b", f_on, exp); end
      if (f_off !== 1'b0) begin failures++; $display("FAIL fused with MR_EN=0"); end
      @(posedge clk);
    end
    checks++;
    if (fused == 0) begin failures++; $display("FAIL no fusing case"); end
    $display("fused cases: %0d", fused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
