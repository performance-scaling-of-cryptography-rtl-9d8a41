// tb_dual_field_mul: checks integer and binary-field products of the
// dual-field multiplier at 32 and 128 bits against reference models: the
// simulator's own wide multiplication for integers, and a bit-serial
// shift-and-xor loop for carry-less products. Includes the corner operands
// 0, 1 and all-ones.
module tb_dual_field_mul;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         m32, m128;
  logic [31:0]  a32, b32, lo32, hi32;
  logic [127:0] a128, b128, lo128, hi128;
  dual_field_mul #(.W(32))  d32  (.mode(m32),  .a(a32),  .b(b32),  .lo(lo32),  .hi(hi32));
  dual_field_mul #(.W(128)) d128 (.mode(m128), .a(a128), .b(b128), .lo(lo128), .hi(hi128));

  function automatic logic [255:0] clmul(logic [127:0] a, logic [127:0] b, int w);
    logic [255:0] r = '0;
    for (int i = 0; i < w; i++)
      for (int j = 0; j < w; j++)
        r[i+j] ^= a[i] & b[j];
    return r;
  endfunction

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
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
    logic [127:0] ops [4];
    for (int n = 0; n < 600; n++) begin
      if (n < 16) begin
        ops[0] = '0; ops[1] = 128'd1; ops[2] = '1; ops[3] = {4{32'h8000_0001}};
        a128 = ops[n % 4]; b128 = ops[n / 4];
      end else begin
        a128 = {$urandom, $urandom, $urandom, $urandom};
        b128 = {$urandom, $urandom, $urandom, $urandom};
      end
      a32 = a128[31:0]; b32 = b128[127:96];
      m32 = n[0]; m128 = n[1];
      #1;
      if (m32) check("gf32",  256'({hi32, lo32}), clmul(128'(a32), 128'(b32), 32));
      else     check("int32", 256'({hi32, lo32}), 256'(64'(a32) * 64'(b32)));
      if (m128) check("gf128", {hi128, lo128}, clmul(a128, b128, 128));
      else      check("int128", {hi128, lo128}, 256'(a128) * 256'(b128));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
