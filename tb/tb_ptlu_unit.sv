// tb_ptlu_unit: self-checking test of the parallel table lookup unit.
//
// Two instances: a 32-bit one that replays the two worked examples of the
// ptlu instruction (one 4-byte lookup from T6 indexed by byte 2 of Rs; four
// 1-byte lookups from T3 indexed by bytes 0..3 of Rs), and a 128-bit one that
// is filled with random tables and checked against a reference model for
// random subword/table/offset/step combinations. The reference computes the
// expected word byte by byte from its own copy of the tables. Also checks
// that a write is visible to a lookup in the next cycle.
module tb_ptlu_unit;
  import pax_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- 32-bit instance ----
  logic        we32;
  logic [2:0]  wt32;
  logic [7:0]  wi32;
  logic [31:0] wd32, rs32, rd32;
  ptlu_sub_t   sub32;
  ptlu_unit #(.W(32)) dut32 (.clk, .we(we32), .wtable(wt32), .windex(wi32),
                             .wdata(wd32), .rs(rs32), .sub(sub32), .rd(rd32));

  // ---- 128-bit instance ----
  logic         we;
  logic [2:0]   wt;
  logic [7:0]   wi;
  logic [127:0] wd, rs, rd;
  ptlu_sub_t    sub;
  ptlu_unit #(.W(128)) dut (.clk, .we, .wtable(wt), .windex(wi),
                            .wdata(wd), .rs, .sub, .rd);

  logic [127:0] model [8][256];
  logic [31:0]  model32 [8][256];

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [127:0] ref_lookup(logic [127:0] r, int s, int t, int off, int st);
    logic [127:0] e = '0;
    int n = 16 / s;
    if (n > 4) n = 4;
    for (int k = 0; k < n; k++) begin
      int bp = (off + k * st) % 16;
      logic [7:0] idx = r[bp*8 +: 8];
      for (int j = 0; j < s; j++)
        e[(k*s + j)*8 +: 8] = model[t][idx][j*8 +: 8];
    end
    return e;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; we32 = 0; sub = '0; sub32 = '0; rs = '0; rs32 = '0;
    wt = '0; wi = '0; wd = '0; wt32 = '0; wi32 = '0; wd32 = '0;
    // fill all tables
    for (int t = 0; t < 8; t++)
      for (int i = 0; i < 256; i++) begin
        model[t][i]   = {$urandom, $urandom, $urandom, $urandom};
        model32[t][i] = $urandom;
        @(negedge clk);
        we = 1; wt = 3'(t); wi = 8'(i); wd = model[t][i];
        we32 = 1; wt32 = 3'(t); wi32 = 8'(i); wd32 = model32[t][i];
      end
    @(negedge clk);
    we = 0; we32 = 0;

    // Example (a): ptlu.4.6.2.0 -- 4-byte lookup from T6, index = byte 2 of Rs.
    rs32  = 32'h11_A7_22_33;
    sub32 = '{subword: 5'd4, table_id: 3'd6, offset: 4'd2, step: 4'd0};
    #1 check("fig2a", 128'(rd32), 128'(model32[6][8'hA7]));

    // Example (b): ptlu.1.3.0.1 -- byte substitution of a word through T3.
    rs32  = 32'h04_C3_5E_90;
    sub32 = '{subword: 5'd1, table_id: 3'd3, offset: 4'd0, step: 4'd1};
    #1 check("fig2b", 128'(rd32),
             128'({model32[3][8'h04][7:0], model32[3][8'hC3][7:0],
                   model32[3][8'h5E][7:0], model32[3][8'h90][7:0]}));

    // Two 2-byte lookups on the 32-bit instance fill the word.
    rs32  = 32'hDE_AD_BE_EF;
    sub32 = '{subword: 5'd2, table_id: 3'd1, offset: 4'd1, step: 4'd2};
    #1 check("w32 sub2", 128'(rd32),
             128'({model32[1][8'hDE][15:0], model32[1][8'hBE][15:0]}));

    // Random lookups on the 128-bit instance.
    for (int n = 0; n < 3000; n++) begin
      int s, t, off, st;
      s   = 1 << ($urandom % 5);
      t   = $urandom % 8;
      off = $urandom % 16;
      st  = $urandom % 16;
      rs  = {$urandom, $urandom, $urandom, $urandom};
      sub = '{subword: 5'(s), table_id: 3'(t), offset: 4'(off), step: 4'(st)};
      #1 check($sformatf("w128 s=%0d t=%0d o=%0d st=%0d", s, t, off, st),
               rd, ref_lookup(rs, s, t, off, st));
      @(negedge clk);
    end

    // Unsupported subword returns zero.
    sub = '{subword: 5'd3, table_id: 3'd0, offset: 4'd0, step: 4'd1};
    #1 check("bad subword", rd, '0);

    // Write then look up in the next cycle.
    @(negedge clk);
    we = 1; wt = 3'd5; wi = 8'h42; wd = 128'hCAFE_F00D_0123_4567_89AB_CDEF_0BAD_BEEF;
    model[5][8'h42] = wd;
    @(negedge clk);
    we = 0;
    rs  = 128'h42;
    sub = '{subword: 5'd16, table_id: 3'd5, offset: 4'd0, step: 4'd0};
    #1 check("write then read", rd, model[5][8'h42]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
