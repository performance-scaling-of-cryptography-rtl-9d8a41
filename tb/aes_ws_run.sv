// aes_ws_run: testbench helper that runs AES-128 encryption on one client
// core of word size W (32, 64 or 128) using the ptlu tables, and checks the
// ciphertext against the byte-level reference.
//
// Program per round (T = T0..T3, or T4..T7 in the last round):
//   W = 32 : state in four column registers; per output column four
//            ptlu.4.T(i).i.0 from column (j+i) mod 4, three XORs and one XOR
//            with the round-key word; round-key words are brought in with
//            load-immediate (standing in for loads): 4 + 16 + 16 = 36 ops.
//   W = 64 : state in two registers (columns 0-1, 2-3); two realigned copies
//            (columns 1-2 and 3-0) are built with shifts and an OR; per output
//            register four ptlu with two lookups each, three XORs and the key
//            XOR: 2 + 6 + 8 + 8 = 24 ops.
//   W = 128: one state register, four ptlu with four lookups each:
//            1 + 8 = 9 ops.
// The initial key addition takes one load-immediate and one XOR per state word.
// Reports the cycles of the encryption (table loading excluded).
module aes_ws_run
  import pax_pkg::*;
  import aes_ref_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles
);
  localparam int NW = 128 / W;   // state words

  logic         rst_n, op_valid, wb_valid;
  pax_op_t      op;
  logic [W-1:0] imm, wb_data, dbg_rdata;
  logic [4:0]   wb_rd, dbg_raddr;
  pax_core #(.W(W)) core (.clk, .rst_n, .op_valid, .op, .imm, .wb_valid, .wb_rd,
                          .wb_data, .dbg_raddr, .dbg_rdata);

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic issue(pax_op_t o, logic [W-1:0] im);
    @(negedge clk);
    op = o; imm = im; op_valid = 1'b1;
  endtask

  function automatic pax_op_t mk(op_e o, int rd, int rs1 = 0, int rs2 = 0);
    pax_op_t r = '0;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2);
    return r;
  endfunction

  function automatic pax_op_t mk_sh(op_e o, int rd, int rs1, int sh);
    pax_op_t r = mk(o, rd, rs1);
    r.use_imm = 1'b1; r.shamt = 7'(sh);
    return r;
  endfunction

  function automatic pax_op_t tlu(int rd, int rs, int t, int off, int st);
    pax_op_t r = mk(OP_PTLU, rd, rs);
    r.sub = '{subword: 5'd4, table_id: 3'(t), offset: 4'(off), step: 4'(st)};
    return r;
  endfunction

  initial begin
    aes_ref_pkg::sbox_t sb;
    aes_ref_pkg::rk_t   rk;
    logic [127:0] key, pt, ct, got;
    int s [4], n [4];
    done = 0; checks = 0; failures = 0; cycles = 0;
    rst_n = 0; op_valid = 0; op = '0; imm = '0; dbg_raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sb = make_sbox();
    // tables
    for (int x = 0; x < 256; x++) begin
      logic [7:0]  v, v2, v3;
      logic [31:0] te [8];
      pax_op_t     w;
      v = sb[x]; v2 = gmul8(v, 8'h02); v3 = gmul8(v, 8'h03);
      te[0] = {v3, v, v, v2};
      te[1] = {v, v, v2, v3};
      te[2] = {v, v2, v3, v};
      te[3] = {v2, v3, v, v};
      for (int i = 0; i < 4; i++) te[4+i] = 32'(v) << (8*i);
      issue(mk(OP_LI, 20), W'(x));
      for (int t = 0; t < 8; t++) begin
        issue(mk(OP_LI, 21), W'(te[t]));
        w = mk(OP_TWR, 0, 20, 21);
        w.sub.table_id = 3'(t);
        issue(w, '0);
      end
    end
    key = from_str(128'h000102030405060708090a0b0c0d0e0f);
    pt  = from_str(128'h00112233445566778899aabbccddeeff);
    rk  = expand_key(key, sb);
    // state words in r0..r(NW-1); alternate sets s/n
    for (int i = 0; i < NW; i++) issue(mk(OP_LI, i), W'(pt >> (W*i)));
    for (int i = 0; i < 4; i++) begin s[i] = i; n[i] = 4 + i; end
    @(negedge clk);
    op_valid = 0;
    cycles = cyc;
    // initial key addition: key words in r12.., then XOR
    for (int i = 0; i < NW; i++) issue(mk(OP_LI, 12 + i), W'(rk[0] >> (W*i)));
    for (int i = 0; i < NW; i++) issue(mk(OP_XOR, s[i], s[i], 12 + i), '0);
    for (int r = 1; r <= 10; r++) begin
      automatic int tb = (r == 10) ? 4 : 0;
      for (int i = 0; i < NW; i++) issue(mk(OP_LI, 12 + i), W'(rk[r] >> (W*i)));
      if (W == 32) begin
        for (int j = 0; j < 4; j++) begin
          for (int i = 0; i < 4; i++) issue(tlu(8 + i, s[(j + i) % 4], tb + i, i, 0), '0);
          issue(mk(OP_XOR, 8, 8, 9), '0);
          issue(mk(OP_XOR, 10, 10, 11), '0);
          issue(mk(OP_XOR, 8, 8, 10), '0);
          issue(mk(OP_XOR, n[j], 8, 12 + j), '0);
        end
      end else if (W == 64) begin
        // X = columns 1-2 (r16), Y = columns 3-0 (r17)
        issue(mk_sh(OP_SRL, 18, s[0], 32), '0);
        issue(mk_sh(OP_SLL, 19, s[1], 32), '0);
        issue(mk(OP_OR, 16, 18, 19), '0);
        issue(mk_sh(OP_SRL, 18, s[1], 32), '0);
        issue(mk_sh(OP_SLL, 19, s[0], 32), '0);
        issue(mk(OP_OR, 17, 18, 19), '0);
        for (int h = 0; h < 2; h++) begin
          int src [4];
          if (h == 0) src = '{s[0], 16, s[1], 17};
          else        src = '{s[1], 17, s[0], 16};
          for (int i = 0; i < 4; i++) issue(tlu(8 + i, src[i], tb + i, i, 4), '0);
          issue(mk(OP_XOR, 8, 8, 9), '0);
          issue(mk(OP_XOR, 10, 10, 11), '0);
          issue(mk(OP_XOR, 8, 8, 10), '0);
          issue(mk(OP_XOR, n[h], 8, 12 + h), '0);
        end
      end else begin
        issue(tlu(8, s[0], tb + 0, 0, 4), '0);
        issue(tlu(9, s[0], tb + 1, 5, 4), '0);
        issue(mk(OP_XOR, 8, 8, 9), '0);
        issue(tlu(10, s[0], tb + 2, 10, 4), '0);
        issue(tlu(11, s[0], tb + 3, 15, 4), '0);
        issue(mk(OP_XOR, 10, 10, 11), '0);
        issue(mk(OP_XOR, 8, 8, 10), '0);
        issue(mk(OP_XOR, n[0], 8, 12), '0);
      end
      for (int i = 0; i < 4; i++) begin automatic int t = s[i]; s[i] = n[i]; n[i] = t; end
    end
    @(negedge clk);
    op_valid = 0;
    cycles = cyc - cycles - 1;
    for (int i = 0; i < NW; i++) begin
      dbg_raddr = 5'(s[i]);
      #1 got[W*i +: W] = dbg_rdata;
    end
    ct = encrypt(pt, rk, sb);
    checks++;
    if (got !== ct) begin
      failures++;
      $display("FAIL W=%0d AES ciphertext %h expected %h", W, got, ct);
    end
    checks++;
    if (got !== from_str(128'h69c4e0d86a7b0430d8cdb78070b4c55a)) begin
      failures++;
      $display("FAIL W=%0d FIPS-197 vector", W);
    end
    done = 1;
  end
endmodule
