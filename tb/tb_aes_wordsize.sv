// tb_aes_wordsize: AES-128 encryption of the FIPS-197 test block on the
// client core at word sizes 32, 64 and 128 bits, all with ptlu. Checks the
// ciphertext at each size and the cycle count of each program (including
// bringing in the round keys): 368, 244 and 92 cycles. The wider word lets
// each ptlu do more lookups; the ratio 4.0 between 32 and 128 bits is
// printed for comparison with the scaling of the whole cipher.
module tb_aes_wordsize;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [3];
  int   c [3], f [3], cy [3];
  aes_ws_run #(.W(32))  r32  (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .cycles(cy[0]));
  aes_ws_run #(.W(64))  r64  (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .cycles(cy[1]));
  aes_ws_run #(.W(128)) r128 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .cycles(cy[2]));

  int checks = 0, failures = 0;
  int expect_cycles [3] = '{368, 244, 92};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      $display("W=%0d: AES-128 block in %0d cycles", 32 << i, cy[i]);
      if (cy[i] != expect_cycles[i]) begin
        failures++;
        $display("FAIL W=%0d took %0d cycles, expected %0d", 32 << i, cy[i], expect_cycles[i]);
      end
    end
    $display("speedup 32->64: %0.2f, 32->128: %0.2f", real'(cy[0]) / cy[1], real'(cy[0]) / cy[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
