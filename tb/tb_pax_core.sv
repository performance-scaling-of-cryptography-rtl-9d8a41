// tb_pax_core: end-to-end test of the single-issue core at its default
// 128-bit word size.
//
// Part 1 runs random ALU, shift/rotate (fixed and variable), integer and
// binary-field multiply and load-immediate operations back to back and
// checks every write-back against a register model kept in the testbench.
//
// Part 2 encrypts AES-128 blocks with the parallel table lookup. Software
// fills T0-T3 with the four rotations of the combined SubBytes/MixColumns
// table and T4-T7 with the S-box placed in byte 0..3 (for the last round),
// using table writes. One round is then four ptlu operations, one per
// table, each gathering the four state bytes of one row of the shifted
// state (offset 0/5/10/15, step 4, wrapping within the 16-byte word), and
// four exclusive-ors. The ciphertext is checked against the FIPS-197 test
// vector and against a byte-level reference for random keys and blocks, and
// the block must take exactly 81 cycles (1 + 10 rounds x 8 operations) with
// no stall between a ptlu and the operation that uses its result.
module tb_pax_core;
  import pax_pkg::*;
  import aes_ref_pkg::*;

  localparam int W = 128;
  int checks = 0, failures = 0;
  int n_ptlu = 0, n_twr = 0, n_mul = 0, n_gmul = 0, n_rot = 0, n_ptlu_use = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, op_valid, wb_valid;
  pax_op_t      op;
  logic [W-1:0] imm, wb_data, dbg_rdata;
  logic [4:0]   wb_rd, dbg_raddr;
  pax_core #(.W(W)) dut (.clk, .rst_n, .op_valid, .op, .imm, .wb_valid, .wb_rd,
                         .wb_data, .dbg_raddr, .dbg_rdata);

  logic [W-1:0] model [32];
  logic [4:0]   last_ptlu_rd;
  logic         last_was_ptlu;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [2*W-1:0] clmul(logic [W-1:0] a, logic [W-1:0] b);
    logic [2*W-1:0] r = '0;
    for (int i = 0; i < W; i++) if (b[i]) r ^= (2*W)'(a) << i;
    return r;
  endfunction

  // Reference result of one operation.
  function automatic logic [W-1:0] ref_op(pax_op_t o, logic [W-1:0] im);
    logic [W-1:0] a = model[o.rs1], b = model[o.rs2];
    int s = o.use_imm ? int'(o.shamt) % W : int'(b[6:0]) % W;
    logic [2*W-1:0] p = (2*W)'(a) * (2*W)'(b);
    logic [2*W-1:0] g = clmul(a, b);
    case (o.op)
      OP_LI:     return im;
      OP_ADD:    return a + b;
      OP_SUB:    return a - b;
      OP_AND:    return a & b;
      OP_OR:     return a | b;
      OP_XOR:    return a ^ b;
      OP_ANDN:   return a & ~b;
      OP_SLL:    return a << s;
      OP_SRL:    return a >> s;
      OP_ROL:    return (s == 0) ? a : ((a << s) | (a >> (W - s)));
      OP_ROR:    return (s == 0) ? a : ((a >> s) | (a << (W - s)));
      OP_MULLO:  return p[W-1:0];
      OP_MULHI:  return p[2*W-1:W];
      OP_GMULLO: return g[W-1:0];
      OP_GMULHI: return g[2*W-1:W];
      default:   return '0;
    endcase
  endfunction

  // Issue one operation in the next cycle; check its write-back.
  task automatic issue(pax_op_t o, logic [W-1:0] im, bit chk = 1'b1);
    logic [W-1:0] exp;
    @(negedge clk);
    op = o; imm = im; op_valid = 1'b1;
    if (last_was_ptlu && (o.rs1 == last_ptlu_rd || o.rs2 == last_ptlu_rd)) n_ptlu_use++;
    last_was_ptlu = (o.op == OP_PTLU);
    last_ptlu_rd  = o.rd;
    if (o.op == OP_PTLU) n_ptlu++;
    if (o.op == OP_TWR) n_twr++;
    if (o.op inside {OP_MULLO, OP_MULHI}) n_mul++;
    if (o.op inside {OP_GMULLO, OP_GMULHI}) n_gmul++;
    if (o.op inside {OP_ROL, OP_ROR}) n_rot++;
    exp = ref_op(o, im);
    @(posedge clk);
    #1;
    if (writes_rd(o.op)) begin
      if (chk && o.op != OP_PTLU) begin
        checks++;
        if (!wb_valid || wb_rd != o.rd || wb_data !== exp) begin
          failures++;
          $display("FAIL op %s rd=%0d got %h expected %h", o.op.name(), o.rd, wb_data, exp);
        end
      end
      model[o.rd] = wb_data;  // ptlu results are checked through the cipher
    end
  endtask

  function automatic pax_op_t mk(op_e o, int rd, int rs1 = 0, int rs2 = 0);
    pax_op_t r = '0;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2);
    return r;
  endfunction

  function automatic pax_op_t mk_ptlu(int rd, int rs, int sw, int t, int off, int st);
    pax_op_t r = mk(OP_PTLU, rd, rs);
    r.sub = '{subword: 5'(sw), table_id: 3'(t), offset: 4'(off), step: 4'(st)};
    return r;
  endfunction

  function automatic pax_op_t mk_twr(int t, int ridx, int rdat);
    pax_op_t r = mk(OP_TWR, 0, ridx, rdat);
    r.sub.table_id = 3'(t);
    return r;
  endfunction

  sbox_t sb;

  task automatic load_tables();
    for (int x = 0; x < 256; x++) begin
      logic [7:0]  s  = sb[x];
      logic [7:0]  s2 = gmul8(s, 8'h02), s3 = gmul8(s, 8'h03);
      logic [31:0] te [8];
      te[0] = {s3, s, s, s2};    // column (2,1,1,3)
      te[1] = {s, s, s2, s3};    // column (3,2,1,1)
      te[2] = {s, s2, s3, s};    // column (1,3,2,1)
      te[3] = {s2, s3, s, s};    // column (1,1,3,2)
      for (int i = 0; i < 4; i++) te[4+i] = 32'(s) << (8*i);
      issue(mk(OP_LI, 20), W'(x));
      for (int t = 0; t < 8; t++) begin
        issue(mk(OP_LI, 21), W'(te[t]));
        issue(mk_twr(t, 20, 21), '0);
      end
    end
  endtask

  // Encrypt one block held in r0 (each ptlu result of a pair is combined by
  // the very next operation) with round keys in r1..r11; returns cycles.
  task automatic aes_block(output int cycles);
    int c0;
    c0 = cyc;
    issue(mk(OP_XOR, 0, 0, 1), '0);
    for (int r = 1; r <= 10; r++) begin
      int tb = (r == 10) ? 4 : 0;
      issue(mk_ptlu(12, 0, 4, tb + 0, 0, 4), '0);
      issue(mk_ptlu(13, 0, 4, tb + 1, 5, 4), '0);
      issue(mk(OP_XOR, 12, 12, 13), '0);
      issue(mk_ptlu(14, 0, 4, tb + 2, 10, 4), '0);
      issue(mk_ptlu(15, 0, 4, tb + 3, 15, 4), '0);
      issue(mk(OP_XOR, 14, 14, 15), '0);
      issue(mk(OP_XOR, 12, 12, 14), '0);
      issue(mk(OP_XOR, 0, 12, 1 + r), '0);
    end
    cycles = cyc - c0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; op_valid = 0; op = '0; imm = '0; dbg_raddr = '0;
    last_was_ptlu = 0; last_ptlu_rd = '0;
    for (int r = 0; r < 32; r++) model[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- Part 1: random operations ----
    for (int r = 0; r < 32; r++)
      issue(mk(OP_LI, r), {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 3000; n++) begin
      automatic op_e l [15] = '{OP_LI, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_ANDN, OP_SLL,
                      OP_SRL, OP_ROL, OP_ROR, OP_MULLO, OP_MULHI, OP_GMULLO, OP_GMULHI};
      pax_op_t o;
      o = mk(l[$urandom % 15], $urandom % 32, $urandom % 32, $urandom % 32);
      o.use_imm = 1'($urandom);
      o.shamt   = 7'($urandom);
      issue(o, {$urandom, $urandom, $urandom, $urandom});
    end
    // Debug read port sees the register file.
    @(negedge clk);
    op_valid = 0;
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = 5'(r);
      #1 check($sformatf("dbg r%0d", r), dbg_rdata, model[r]);
    end

    // ---- Part 2: AES-128 with ptlu ----
    sb = make_sbox();
    load_tables();
    for (int blk = 0; blk < 6; blk++) begin
      logic [127:0] key, pt, ct;
      rk_t rk;
      int cycles;
      if (blk == 0) begin
        key = from_str(128'h000102030405060708090a0b0c0d0e0f);
        pt  = from_str(128'h00112233445566778899aabbccddeeff);
      end else begin
        key = {$urandom, $urandom, $urandom, $urandom};
        pt  = {$urandom, $urandom, $urandom, $urandom};
      end
      rk = expand_key(key, sb);
      for (int r = 0; r < 11; r++) issue(mk(OP_LI, 1 + r), rk[r]);
      issue(mk(OP_LI, 0), pt);
      aes_block(cycles);
      @(negedge clk);
      op_valid = 0;
      dbg_raddr = 5'd0;
      ct = encrypt(pt, rk, sb);
      #1 check($sformatf("aes block %0d", blk), dbg_rdata, ct);
      if (blk == 0)
        check("FIPS-197 vector", dbg_rdata, from_str(128'h69c4e0d86a7b0430d8cdb78070b4c55a));
      checks++;
      if (cycles != 81) begin
        failures++;
        $display("FAIL aes block took %0d cycles, expected 81", cycles);
      end
      if (blk == 0) $display("AES-128 block: %0d cycles", cycles);
    end

    // mechanisms exercised
    checks += 5;
    if (n_ptlu == 0)     begin failures++; $display("FAIL no ptlu"); end
    if (n_twr == 0)      begin failures++; $display("FAIL no table write"); end
    if (n_mul == 0)      begin failures++; $display("FAIL no integer multiply"); end
    if (n_gmul == 0)     begin failures++; $display("FAIL no binary-field multiply"); end
    if (n_ptlu_use == 0) begin failures++; $display("FAIL no back-to-back ptlu use"); end
    $display("ptlu=%0d table writes=%0d mul=%0d gmul=%0d rotates=%0d ptlu->use=%0d",
             n_ptlu, n_twr, n_mul, n_gmul, n_rot, n_ptlu_use);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
