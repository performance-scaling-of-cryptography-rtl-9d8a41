// tb_gf163_client: binary-field elliptic-curve arithmetic on the 128-bit
// client core: multiplication in GF(2^163) with the NIST B-163 reduction
// polynomial f(x) = x^163 + x^7 + x^6 + x^3 + 1.
//
// Each field element occupies two 128-bit registers (bits 0-127, 128-162).
// The program forms the four word products with gmul.lo/gmul.hi, combines
// them into the 325-bit product c3:c2:c1:c0, and reduces it in two passes:
// the part above bit 162, H, is multiplied by r(x) = x^7+x^6+x^3+1 (0xC9)
// with gmul and folded into the low part, since x^163 = r(x) mod f. Results
// of random operand pairs are compared with a bit-serial shift-and-reduce
// reference; one multiplication must take 26 cycles (26 operations).
module tb_gf163_client;
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

  task automatic issue(pax_op_t o, logic [W-1:0] im = '0);
    @(negedge clk);
    op = o; imm = im; op_valid = 1'b1;
  endtask

  function automatic pax_op_t mk(op_e o, int rd, int rs1 = 0, int rs2 = 0);
    pax_op_t r = '0;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2);
    return r;
  endfunction

  function automatic pax_op_t sh(op_e o, int rd, int rs1, int n);
    pax_op_t r = mk(o, rd, rs1);
    r.use_imm = 1'b1; r.shamt = 7'(n);
    return r;
  endfunction

  // Reference: shift-and-add multiplication with reduction after each step.
  function automatic logic [162:0] gf_mul(logic [162:0] a, logic [162:0] b);
    logic [162:0] r = '0;
    for (int i = 162; i >= 0; i--) begin
      logic top = r[162];
      r = r << 1;
      if (top) r ^= 163'h0C9;
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  // Registers: a = r0,r1  b = r2,r3  result = r4,r5
  //            R = r6 (0xC9)  M = r7 (2^35 - 1)  temporaries r8..r19
  task automatic field_mul();
    issue(mk(OP_GMULLO, 8, 0, 2));     // a0*b0
    issue(mk(OP_GMULHI, 9, 0, 2));
    issue(mk(OP_GMULLO, 10, 0, 3));    // a0*b1
    issue(mk(OP_GMULHI, 11, 0, 3));
    issue(mk(OP_GMULLO, 12, 1, 2));    // a1*b0
    issue(mk(OP_GMULHI, 13, 1, 2));
    issue(mk(OP_GMULLO, 14, 1, 3));    // a1*b1 (below 2^69)
    // c0 = r8, c1 = r9, c2 = r11, c3 = 0 (a1*b1 < 2^69 so it lands in c2)
    issue(mk(OP_XOR, 9, 9, 10));
    issue(mk(OP_XOR, 9, 9, 12));
    issue(mk(OP_XOR, 11, 11, 13));
    issue(mk(OP_XOR, 11, 11, 14));
    // H0 = (c1 >> 35) | (c2 << 93), H1 = c2 >> 35
    issue(sh(OP_SRL, 15, 9, 35));
    issue(sh(OP_SLL, 16, 11, 93));
    issue(mk(OP_OR, 15, 15, 16));
    issue(sh(OP_SRL, 16, 11, 35));
    // L1 = c1 & M
    issue(mk(OP_AND, 9, 9, 7));
    // T = H * r
    issue(mk(OP_GMULLO, 17, 15, 6));
    issue(mk(OP_GMULHI, 18, 15, 6));
    issue(mk(OP_GMULLO, 19, 16, 6));
    issue(mk(OP_XOR, 18, 18, 19));
    // X = L ^ T
    issue(mk(OP_XOR, 4, 8, 17));
    issue(mk(OP_XOR, 5, 9, 18));
    // second pass: H' = X1 >> 35 (a few bits), X1 &= M, X0 ^= H'*r
    issue(sh(OP_SRL, 15, 5, 35));
    issue(mk(OP_AND, 5, 5, 7));
    issue(mk(OP_GMULLO, 17, 15, 6));
    issue(mk(OP_XOR, 4, 4, 17));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, cycles;
    rst_n = 0; op_valid = 0; op = '0; imm = '0; dbg_raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    issue(mk(OP_LI, 6), W'(8'hC9));
    issue(mk(OP_LI, 7), W'(35'h7_FFFF_FFFF));
    for (int n = 0; n < 200; n++) begin
      logic [162:0] a, b, e;
      logic [255:0] got;
      a = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      b = 163'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      if (n == 0) begin a = 163'd1 << 162; b = 163'd1 << 162; end
      if (n == 1) begin a = '1; b = '1; end
      issue(mk(OP_LI, 0), a[127:0]);
      issue(mk(OP_LI, 1), W'(a[162:128]));
      issue(mk(OP_LI, 2), b[127:0]);
      issue(mk(OP_LI, 3), W'(b[162:128]));
      c0 = cyc + 1;
      field_mul();
      @(negedge clk);
      op_valid = 0;
      cycles = cyc - c0;
      dbg_raddr = 5'd4;
      #1 got[127:0] = dbg_rdata;
      dbg_raddr = 5'd5;
      #1 got[255:128] = dbg_rdata;
      e = gf_mul(a, b);
      checks++;
      if (got !== 256'(e)) begin
        failures++;
        $display("FAIL GF(2^163) product %h expected %h", got, e);
      end
      checks++;
      if (cycles != 26) begin
        failures++;
        $display("FAIL field multiply took %0d cycles, expected 26", cycles);
      end
      if (n == 0) $display("GF(2^163) multiply with reduction: %0d cycles", cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
