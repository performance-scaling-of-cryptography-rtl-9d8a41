// tb_crypto_top: end-to-end test of the whole design at its default
// parameters (128-bit client, 32-bit 2-way server with two-word-result
// multiplier), both datapaths running at the same time.
//
// Client: software loads the eight lookup tables (T0-T3: combined
// SubBytes/MixColumns columns, T4-T7: S-box in byte 0..3), then encrypts
// AES-128 blocks with four ptlu lookups and four exclusive-ors per round.
// Checked: the FIPS-197 vector, random blocks against a byte-level
// reference, 81 cycles per block.
//
// Server: the multiplication step of a 163-bit binary-field elliptic-curve
// operation (the NIST B-163 field size): two 163-bit polynomials in six
// 32-bit words each are multiplied word by word with gmul.lo/gmul.hi pairs
// and the partial products accumulated by exclusive-or into a twelve-word
// product, which is compared with a carry-less reference. The issue status
// must show fused pairs, dual issue and single issue (the latter from a
// final chain of dependent exclusive-ors that folds the product words).
module tb_crypto_top;
  import pax_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_ptlu = 0, n_twr = 0, n_ptlu_use = 0;
  int n_fused = 0, n_dual = 0, n_single = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          c_op_valid, c_wb_valid;
  pax_op_t       c_op;
  logic [127:0]  c_imm, c_wb_data, c_dbg_rdata;
  logic [4:0]    c_wb_rd, c_dbg_raddr;
  logic [1:0]    s_in_valid, s_issue_n;
  srv_op_t [1:0] s_in_op;
  logic          s_in_ready, s_issue_fused, s_idle;
  logic [4:0]    s_dbg_raddr;
  logic [31:0]   s_dbg_rdata;

  crypto_top dut (.*);

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (s_issue_fused) n_fused++;
      else if (s_issue_n == 2) n_dual++;
      else if (s_issue_n == 1) n_single++;
    end
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- client helpers ----------------
  logic       last_was_ptlu = 1'b0;
  logic [4:0] last_rd = '0;

  task automatic c_issue(pax_op_t o, logic [127:0] im);
    @(negedge clk);
    c_op = o; c_imm = im; c_op_valid = 1'b1;
    if (last_was_ptlu && (o.rs1 == last_rd || o.rs2 == last_rd)) n_ptlu_use++;
    last_was_ptlu = (o.op == OP_PTLU);
    last_rd = o.rd;
    if (o.op == OP_PTLU) n_ptlu++;
    if (o.op == OP_TWR) n_twr++;
  endtask

  function automatic pax_op_t c_mk(op_e o, int rd, int rs1 = 0, int rs2 = 0);
    pax_op_t r = '0;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2);
    return r;
  endfunction

  function automatic pax_op_t c_ptlu(int rd, int t, int off);
    pax_op_t r = c_mk(OP_PTLU, rd, 0);
    r.sub = '{subword: 5'd4, table_id: 3'(t), offset: 4'(off), step: 4'd4};
    return r;
  endfunction

  task automatic client_run();
    aes_ref_pkg::sbox_t sb = make_sbox();
    for (int x = 0; x < 256; x++) begin
      logic [7:0]  s  = sb[x];
      logic [7:0]  s2 = gmul8(s, 8'h02), s3 = gmul8(s, 8'h03);
      logic [31:0] te [8];
      pax_op_t     w;
      te[0] = {s3, s, s, s2};
      te[1] = {s, s, s2, s3};
      te[2] = {s, s2, s3, s};
      te[3] = {s2, s3, s, s};
      for (int i = 0; i < 4; i++) te[4+i] = 32'(s) << (8*i);
      c_issue(c_mk(OP_LI, 20), 128'(x));
      for (int t = 0; t < 8; t++) begin
        c_issue(c_mk(OP_LI, 21), 128'(te[t]));
        w = c_mk(OP_TWR, 0, 20, 21);
        w.sub.table_id = 3'(t);
        c_issue(w, '0);
      end
    end
    for (int blk = 0; blk < 3; blk++) begin
      logic [127:0] key, pt;
      aes_ref_pkg::rk_t rk;
      int c0, cycles;
      if (blk == 0) begin
        key = from_str(128'h000102030405060708090a0b0c0d0e0f);
        pt  = from_str(128'h00112233445566778899aabbccddeeff);
      end else begin
        key = {$urandom, $urandom, $urandom, $urandom};
        pt  = {$urandom, $urandom, $urandom, $urandom};
      end
      rk = expand_key(key, sb);
      for (int r = 0; r < 11; r++) c_issue(c_mk(OP_LI, 1 + r), rk[r]);
      c_issue(c_mk(OP_LI, 0), pt);
      c_issue(c_mk(OP_XOR, 0, 0, 1), '0);
      c0 = cyc;   // cycles from here: the XOR above plus the ten rounds
      for (int r = 1; r <= 10; r++) begin
        int tb = (r == 10) ? 4 : 0;
        c_issue(c_ptlu(12, tb + 0, 0), '0);
        c_issue(c_ptlu(13, tb + 1, 5), '0);
        c_issue(c_mk(OP_XOR, 12, 12, 13), '0);
        c_issue(c_ptlu(14, tb + 2, 10), '0);
        c_issue(c_ptlu(15, tb + 3, 15), '0);
        c_issue(c_mk(OP_XOR, 14, 14, 15), '0);
        c_issue(c_mk(OP_XOR, 12, 12, 14), '0);
        c_issue(c_mk(OP_XOR, 0, 12, 1 + r), '0);
      end
      @(negedge clk);
      c_op_valid = 1'b0;
      cycles = cyc - c0;
      c_dbg_raddr = 5'd0;
      #1 check($sformatf("client AES block %0d", blk), c_dbg_rdata, encrypt(pt, rk, sb));
      if (blk == 0)
        check("client FIPS-197", c_dbg_rdata, from_str(128'h69c4e0d86a7b0430d8cdb78070b4c55a));
      checks++;
      if (cycles != 81) begin
        failures++;
        $display("FAIL client AES block took %0d cycles, expected 81", cycles);
      end
    end
  endtask

  // ---------------- server helpers ----------------
  srv_op_t prog [$];

  function automatic srv_op_t s_mk(op_e o, int rd, int rs1, int rs2, logic [31:0] imm = '0);
    srv_op_t r;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2); r.imm = imm;
    return r;
  endfunction

  function automatic logic [383:0] clmul192(logic [191:0] a, logic [191:0] b);
    logic [383:0] r = '0;
    for (int i = 0; i < 192; i++) if (b[i]) r ^= 384'(a) << i;
    return r;
  endfunction

  task automatic server_run();
    logic [191:0] a, b;
    logic [383:0] p, got;
    int i = 0, c0, cycles;
    a = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    b = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    a[191:163] = '0;
    b[191:163] = '0;
    // a: r0-r5, b: r6-r11, product: r12-r23, temporaries r24/r25
    for (int k = 0; k < 6; k++) begin
      prog.push_back(s_mk(OP_LI, k, 0, 0, a[32*k +: 32]));
      prog.push_back(s_mk(OP_LI, 6 + k, 0, 0, b[32*k +: 32]));
    end
    for (int k = 0; k < 12; k++) prog.push_back(s_mk(OP_LI, 12 + k, 0, 0, 32'd0));
    for (int x = 0; x < 6; x++)
      for (int y = 0; y < 6; y++) begin
        prog.push_back(s_mk(OP_GMULLO, 24, x, 6 + y));
        prog.push_back(s_mk(OP_GMULHI, 25, x, 6 + y));
        prog.push_back(s_mk(OP_XOR, 12 + x + y, 12 + x + y, 24));
        prog.push_back(s_mk(OP_XOR, 13 + x + y, 13 + x + y, 25));
      end
    // Fold the product words into r26: a chain of dependent operations.
    prog.push_back(s_mk(OP_XOR, 26, 12, 13));
    for (int k = 2; k < 12; k++) prog.push_back(s_mk(OP_XOR, 26, 26, 12 + k));
    c0 = cyc;
    while (i < prog.size()) begin
      @(negedge clk);
      s_in_valid = '0;
      if (s_in_ready) begin
        s_in_op[0] = prog[i];
        s_in_valid[0] = 1'b1;
        if (i + 1 < prog.size()) begin
          s_in_op[1] = prog[i+1];
          s_in_valid[1] = 1'b1;
        end
        i += int'(s_in_valid[0]) + int'(s_in_valid[1]);
      end
    end
    @(negedge clk);
    s_in_valid = '0;
    while (!s_idle) @(negedge clk);
    cycles = cyc - c0;
    for (int k = 0; k < 12; k++) begin
      s_dbg_raddr = 5'(12 + k);
      #1 got[32*k +: 32] = s_dbg_rdata;
    end
    p = clmul192(a, b);
    s_dbg_raddr = 5'd26;
    #1 begin
      logic [31:0] fold = '0;
      for (int k = 0; k < 12; k++) fold ^= p[32*k +: 32];
      check("server folded product", 128'(s_dbg_rdata), 128'(fold));
    end
    check("server GF(2^163) product low",  got[127:0],   p[127:0]);
    check("server GF(2^163) product mid",  got[255:128], p[255:128]);
    check("server GF(2^163) product high", got[383:256], p[383:256]);
    $display("server: %0d operations in %0d cycles", prog.size(), cycles);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; c_op_valid = 0; c_op = '0; c_imm = '0; c_dbg_raddr = '0;
    s_in_valid = '0; s_in_op = '0; s_dbg_raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      client_run();
      server_run();
    join
    checks += 6;
    if (n_ptlu == 0)     begin failures++; $display("FAIL no ptlu"); end
    if (n_twr == 0)      begin failures++; $display("FAIL no table write"); end
    if (n_ptlu_use == 0) begin failures++; $display("FAIL no back-to-back ptlu use"); end
    if (n_fused == 0)    begin failures++; $display("FAIL no fused multiply pair"); end
    if (n_dual == 0)     begin failures++; $display("FAIL no dual issue"); end
    if (n_single == 0)   begin failures++; $display("FAIL no single issue"); end
    $display("ptlu=%0d table writes=%0d ptlu->use=%0d fused=%0d dual=%0d single=%0d",
             n_ptlu, n_twr, n_ptlu_use, n_fused, n_dual, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
