// tb_sha1_client: SHA-1 compression on the client core at a 32-bit word size.
// SHA-1 uses no table lookups and only 32-bit serial operations, so it runs
// on the plain ALU and shifter: add, and, or, xor, and-not and fixed rotate.
// The testbench issues the 80 rounds as straight-line code. The five working
// variables a..e live in five registers whose roles rotate each round, so a
// round costs the round function f (3, 2, 4 or 2 operations for rounds
// 0-19, 20-39, 40-59, 60-79), the sum e + f + K + W[t] + rol(a,5) (5), and
// rol(b,30) (1). Rounds 16-79 also expand the message schedule in place in a
// 16-word window (3 xor + 1 rotate). That makes 956 cycles for the 80
// rounds, checked exactly, plus 10 for adding the chaining value.
// Register use: r1..r16 schedule window, r17..r21 a..e, r22..r25 K,
// r26/r27 temporaries. The chaining value is held by the testbench between
// blocks and added on the core. Checked: the digest of "abc" and a
// reference SHA-1 in the testbench over random multi-block messages.
module tb_sha1_client;
  import pax_pkg::*;
  localparam int W = 32;
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

  typedef logic [31:0] h_t [5];
  typedef logic [31:0] blk_t [16];
  localparam logic [31:0] KC [4] = '{32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC, 32'hCA62C1D6};
  localparam logic [31:0] H_INIT [5] =
    '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};

  task automatic issue(pax_op_t o, logic [W-1:0] im = '0);
    @(negedge clk);
    op = o; imm = im; op_valid = 1'b1;
  endtask

  task automatic idle();
    @(negedge clk);
    op_valid = 1'b0;
  endtask

  function automatic pax_op_t mk(op_e o, int rd, int rs1 = 0, int rs2 = 0);
    pax_op_t r = '0;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2);
    return r;
  endfunction

  function automatic pax_op_t rol(int rd, int rs, int n);
    pax_op_t r = mk(OP_ROL, rd, rs);
    r.use_imm = 1'b1;
    r.shamt   = 7'(n);
    return r;
  endfunction

  // One compression on the core; h is updated in place.
  task automatic compress(ref h_t h, input blk_t m, output int round_cycles);
    int v [5];
    int c0, s, a, b, c, d, e;
    for (int i = 0; i < 16; i++) issue(mk(OP_LI, 1 + i), m[i]);
    for (int i = 0; i < 5; i++)  issue(mk(OP_LI, 17 + i), h[i]);
    for (int i = 0; i < 4; i++)  issue(mk(OP_LI, 22 + i), KC[i]);
    v = '{17, 18, 19, 20, 21};
    idle();
    c0 = cyc;
    for (int t = 0; t < 80; t++) begin
      a = v[0]; b = v[1]; c = v[2]; d = v[3]; e = v[4];
      s = 1 + (t % 16);
      if (t >= 16) begin
        issue(mk(OP_XOR, s, s, 1 + ((t - 3) % 16)));
        issue(mk(OP_XOR, s, s, 1 + ((t - 8) % 16)));
        issue(mk(OP_XOR, s, s, 1 + ((t - 14) % 16)));
        issue(rol(s, s, 1));
      end
      if (t < 20) begin                       // ch(b,c,d)
        issue(mk(OP_AND, 26, b, c));
        issue(mk(OP_ANDN, 27, d, b));
        issue(mk(OP_OR, 26, 26, 27));
      end else if (t >= 40 && t < 60) begin   // maj(b,c,d)
        issue(mk(OP_AND, 26, b, c));
        issue(mk(OP_OR, 27, b, c));
        issue(mk(OP_AND, 27, 27, d));
        issue(mk(OP_OR, 26, 26, 27));
      end else begin                          // parity
        issue(mk(OP_XOR, 26, b, c));
        issue(mk(OP_XOR, 26, 26, d));
      end
      issue(mk(OP_ADD, e, e, 26));
      issue(mk(OP_ADD, e, e, 22 + t / 20));
      issue(mk(OP_ADD, e, e, s));
      issue(rol(27, a, 5));
      issue(mk(OP_ADD, e, e, 27));
      issue(rol(b, b, 30));
      v = '{e, a, b, c, d};
    end
    idle();
    round_cycles = cyc - c0 - 1;
    for (int i = 0; i < 5; i++) begin
      issue(mk(OP_LI, 26), h[i]);
      issue(mk(OP_ADD, v[i], v[i], 26));
    end
    idle();
    for (int i = 0; i < 5; i++) begin
      dbg_raddr = 5'(v[i]);
      #1 h[i] = dbg_rdata;
    end
  endtask

  // Reference model, written from the SHA-1 definition.
  function automatic void ref_compress(ref h_t h, input blk_t m);
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, f, k, tmp;
    for (int t = 0; t < 80; t++)
      if (t < 16) w[t] = m[t];
      else begin
        tmp = w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16];
        w[t] = {tmp[30:0], tmp[31]};
      end
    {a, b, c, d, e} = {h[0], h[1], h[2], h[3], h[4]};
    for (int t = 0; t < 80; t++) begin
      if (t < 20)      begin f = (b & c) | (~b & d);          k = KC[0]; end
      else if (t < 40) begin f = b ^ c ^ d;                   k = KC[1]; end
      else if (t < 60) begin f = (b & c) | (b & d) | (c & d); k = KC[2]; end
      else             begin f = b ^ c ^ d;                   k = KC[3]; end
      tmp = {a[26:0], a[31:27]} + f + e + k + w[t];
      e = d; d = c; c = {b[1:0], b[31:2]}; b = a; a = tmp;
    end
    h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h_t   hc, hr;
    blk_t m;
    int   rc;
    static logic [31:0] abc_digest [5] =
      '{32'hA9993E36, 32'h4706816A, 32'hBA3E2571, 32'h7850C26C, 32'h9CD0D89D};
    rst_n = 0; op_valid = 0; op = '0; imm = '0; dbg_raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // "abc", padded to one block: 0x61626380, zeros, bit length 24.
    m = '{default: '0};
    m[0]  = 32'h61626380;
    m[15] = 32'd24;
    hc = H_INIT;
    hr = H_INIT;
    compress(hc, m, rc);
    ref_compress(hr, m);
    for (int i = 0; i < 5; i++) begin
      checks += 2;
      if (hc[i] !== abc_digest[i]) begin
        failures++; $display("FAIL abc word %0d: got %h expected %h", i, hc[i], abc_digest[i]);
      end
      if (hr[i] !== abc_digest[i]) begin
        failures++; $display("FAIL reference abc word %0d: %h", i, hr[i]);
      end
    end
    checks++;
    if (rc != 956) begin failures++; $display("FAIL %0d cycles for 80 rounds, expected 956", rc); end
    $display("SHA-1: %0d cycles for 80 rounds, %0d with the chaining add", rc, rc + 10);

    // Random messages of 1 to 4 blocks, chained.
    for (int msg = 0; msg < 6; msg++) begin
      hc = H_INIT;
      hr = H_INIT;
      for (int bk = 0; bk <= msg % 4; bk++) begin
        foreach (m[i]) m[i] = $urandom;
        compress(hc, m, rc);
        ref_compress(hr, m);
        for (int i = 0; i < 5; i++) begin
          checks++;
          if (hc[i] !== hr[i]) begin
            failures++;
            $display("FAIL message %0d block %0d word %0d: got %h expected %h", msg, bk, i, hc[i], hr[i]);
          end
        end
        checks++;
        if (rc != 956) begin failures++; $display("FAIL %0d round cycles", rc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
