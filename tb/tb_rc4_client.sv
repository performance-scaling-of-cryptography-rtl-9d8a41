// tb_rc4_client: RC4 on the 128-bit client core, the one cipher whose table
// is rewritten as it runs. The state array S lives in table T0 (entry x holds
// S[x] zero-extended), the repeated key bytes in T1. Both the key schedule
// and keystream generation run as core operations: each keystream byte takes
// three single-lookup ptlu reads (S[i], S[j], S[S[i]+S[j]]) and two table
// writes (the swap), 11 operations in all. Checked: the published keystream
// for the key "Key" (EB 9F 77 81 B7 34 CA 72 A7 19) and a reference RC4 in
// the testbench for a random 16-byte key; cycles per keystream byte = 11.
module tb_rc4_client;
  import pax_pkg::*;
  localparam int W = 128;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, op_valid, wb_valid;
  pax_op_t      op;
  logic [W-1:0] imm, wb_data, dbg_rdata;
  logic [4:0]   wb_rd, dbg_raddr;
  pax_core #(.W(W)) dut (.clk, .rst_n, .op_valid, .op, .imm, .wb_valid, .wb_rd,
                         .wb_data, .dbg_raddr, .dbg_rdata);

  int cyc = 0;
  always @(posedge clk) cyc++;

  // Keystream bytes are the writes to r8.
  byte unsigned ks [$];
  always @(posedge clk) if (wb_valid && wb_rd == 5'd8) ks.push_back(wb_data[7:0]);

  task automatic issue(pax_op_t o, logic [W-1:0] im = '0);
    @(negedge clk);
    op = o; imm = im; op_valid = 1'b1;
  endtask

  function automatic pax_op_t mk(op_e o, int rd, int rs1 = 0, int rs2 = 0);
    pax_op_t r = '0;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2);
    return r;
  endfunction

  // single lookup: the whole entry of table t at byte 0 of rs
  function automatic pax_op_t rd_tab(int rd, int rs, int t);
    pax_op_t r = mk(OP_PTLU, rd, rs);
    r.sub = '{subword: 5'd16, table_id: 3'(t), offset: 4'd0, step: 4'd0};
    return r;
  endfunction

  function automatic pax_op_t wr_tab(int ridx, int rdat, int t);
    pax_op_t r = mk(OP_TWR, 0, ridx, rdat);
    r.sub.table_id = 3'(t);
    return r;
  endfunction

  // r1 = i, r2 = j, r3 = 1, r4 = 0xFF, r5 = S[i], r6 = S[j], r7 = t, r8 = out
  task automatic rc4(byte unsigned key [], int nbytes, output int cycles_per_byte);
    int c0;
    issue(mk(OP_LI, 3), W'(1));
    issue(mk(OP_LI, 4), W'(8'hFF));
    for (int x = 0; x < 256; x++) begin
      issue(mk(OP_LI, 10), W'(x));
      issue(mk(OP_LI, 11), W'(key[x % key.size()]));
      issue(wr_tab(10, 10, 0));             // S[x] = x
      issue(wr_tab(10, 11, 1));             // K[x] = key[x mod len]
    end
    // key schedule: for i = 0..255: j = j + S[i] + K[i]; swap S[i], S[j]
    issue(mk(OP_LI, 1), '0);
    issue(mk(OP_LI, 2), '0);
    for (int x = 0; x < 256; x++) begin
      issue(rd_tab(5, 1, 0));
      issue(rd_tab(9, 1, 1));
      issue(mk(OP_ADD, 2, 2, 5));
      issue(mk(OP_ADD, 2, 2, 9));
      issue(mk(OP_AND, 2, 2, 4));
      issue(rd_tab(6, 2, 0));
      issue(wr_tab(1, 6, 0));
      issue(wr_tab(2, 5, 0));
      issue(mk(OP_ADD, 1, 1, 3));
    end
    // keystream generation
    issue(mk(OP_LI, 1), '0);
    issue(mk(OP_LI, 2), '0);
    @(negedge clk);
    op_valid = 1'b0;
    ks.delete();
    c0 = cyc;
    for (int n = 0; n < nbytes; n++) begin
      issue(mk(OP_ADD, 1, 1, 3));
      issue(mk(OP_AND, 1, 1, 4));
      issue(rd_tab(5, 1, 0));
      issue(mk(OP_ADD, 2, 2, 5));
      issue(mk(OP_AND, 2, 2, 4));
      issue(rd_tab(6, 2, 0));
      issue(wr_tab(1, 6, 0));
      issue(wr_tab(2, 5, 0));
      issue(mk(OP_ADD, 7, 5, 6));
      issue(mk(OP_AND, 7, 7, 4));
      issue(rd_tab(8, 7, 0));
    end
    @(negedge clk);
    op_valid = 1'b0;
    cycles_per_byte = (cyc - c0 - 1) / nbytes;
    @(negedge clk);
  endtask

  function automatic void ref_rc4(byte unsigned key [], int nbytes, ref byte unsigned out []);
    int st [256];
    int i = 0, j = 0, t, kl;
    kl = key.size();
    for (int x = 0; x < 256; x++) st[x] = x;
    for (int x = 0; x < 256; x++) begin
      j = (j + st[x] + int'(key[x % kl])) % 256;
      t = st[x]; st[x] = st[j]; st[j] = t;
    end
    i = 0;
    j = 0;
    out = new[nbytes];
    for (int n = 0; n < nbytes; n++) begin
      i = (i + 1) % 256;
      j = (j + st[i]) % 256;
      t = st[i]; st[i] = st[j]; st[j] = t;
      out[n] = 8'(st[(st[i] + st[j]) % 256]);
    end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static byte unsigned key1 [] = '{8'h4B, 8'h65, 8'h79};  // "Key"
    static byte unsigned known [10] = '{8'hEB, 8'h9F, 8'h77, 8'h81, 8'hB7, 8'h34, 8'hCA, 8'h72, 8'hA7, 8'h19};
    byte unsigned key2 [];
    byte unsigned exp [];
    int cpb;
    rst_n = 0; op_valid = 0; op = '0; imm = '0; dbg_raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    rc4(key1, 10, cpb);
    for (int n = 0; n < 10; n++) begin
      checks++;
      if (n >= ks.size() || ks[n] != known[n]) begin
        failures++;
        $display("FAIL known keystream byte %0d", n);
      end
    end
    checks++;
    if (cpb != 11) begin failures++; $display("FAIL %0d cycles per byte, expected 11", cpb); end
    $display("RC4: %0d cycles per keystream byte", cpb);

    ref_rc4(key1, 10, exp);
    for (int n = 0; n < 10; n++) begin
      checks++;
      if (exp[n] != known[n]) begin failures++; $display("FAIL reference model byte %0d %h", n, exp[n]); end
    end

    key2 = new[16];
    foreach (key2[k]) key2[k] = byte'($urandom);
    rc4(key2, 300, cpb);
    ref_rc4(key2, 300, exp);
    for (int n = 0; n < 300; n++) begin
      checks++;
      if (n >= ks.size() || ks[n] != exp[n]) begin
        failures++;
        $display("FAIL random-key keystream byte %0d: got %h expected %h", n,
                 (n < ks.size()) ? ks[n] : 8'h00, exp[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
