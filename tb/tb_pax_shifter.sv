// tb_pax_shifter: checks shifts and rotates at 32 and 128 bits for every
// shift amount against a bit-by-bit reference (bit i of a rotate-left result
// is bit (i - s) mod W of the input).
module tb_pax_shifter;
  import pax_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sh_op_e       op;
  logic [6:0]   amt;
  logic [31:0]  a32, y32;
  logic [127:0] a128, y128;
  pax_shifter #(.W(32))  d32  (.op, .a(a32),  .amt, .y(y32));
  pax_shifter #(.W(128)) d128 (.op, .a(a128), .amt, .y(y128));

  function automatic logic [127:0] refsh(int o, logic [127:0] a, int s, int w);
    logic [127:0] r = '0;
    for (int i = 0; i < w; i++) begin
      case (o)
        0: r[i] = (i >= s) ? a[i-s] : 1'b0;
        1: r[i] = (i + s < w) ? a[i+s] : 1'b0;
        2: r[i] = a[(i - s + w) % w];
        default: r[i] = a[(i + s) % w];
      endcase
    end
    return r;
  endfunction

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++)
      for (int s = 0; s < 128; s++) begin
        op   = sh_op_e'(o);
        amt  = 7'(s);
        a128 = {$urandom, $urandom, $urandom, $urandom};
        a32  = $urandom;
        #1;
        check($sformatf("w128 op%0d s%0d", o, s), y128, refsh(o, a128, s, 128));
        check($sformatf("w32 op%0d s%0d", o, s % 32), 128'(y32), refsh(o, 128'(a32), s % 32, 32));
        @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
