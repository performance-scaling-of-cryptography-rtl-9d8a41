// tb_mr_dual_issue_dp: self-checking test of the 2-way datapath with the
// two-word-result multiplier, with fusion on (MR_EN = 1) and, for
// comparison, off (MR_EN = 0).
//
// A random program rich in mul.lo/mul.hi and gmul.lo/gmul.hi pairs, with
// register numbers drawn from a small range so that dependences are common,
// is run on both instances in 40 chunks; after each chunk every register is
// compared with a sequential reference. A directed case checks that an
// operation reading the previous one's result does not issue with it. The issue log must show each issue case (fused pair,
// dual issue, single issue, pair refused because mul.lo overwrites a source)
// at least once. A program of 16 independent multiply pairs checks the rate:
// 16 issue cycles with fusion, 32 without.
module tb_mr_dual_issue_dp;
  import pax_pkg::*;
  import srv_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [1:0]          in_valid [2];
  srv_op_t [1:0]       in_op    [2];
  logic                in_ready [2], fused [2], idle [2];
  logic [1:0]          issue_n  [2];
  logic [4:0]          dbg_raddr;
  logic [31:0]         dbg_rdata [2];

  mr_dual_issue_dp #(.MR_EN(1'b1)) dut_mr (.clk, .rst_n, .in_valid(in_valid[0]),
    .in_op(in_op[0]), .in_ready(in_ready[0]), .issue_n(issue_n[0]),
    .issue_fused(fused[0]), .idle(idle[0]), .dbg_raddr, .dbg_rdata(dbg_rdata[0]));
  mr_dual_issue_dp #(.MR_EN(1'b0)) dut_1r (.clk, .rst_n, .in_valid(in_valid[1]),
    .in_op(in_op[1]), .in_ready(in_ready[1]), .issue_n(issue_n[1]),
    .issue_fused(fused[1]), .idle(idle[1]), .dbg_raddr, .dbg_rdata(dbg_rdata[1]));

  int n_fused [2], n_dual [2], n_single [2], n_issue_cycles [2];
  always @(posedge clk) begin
    for (int d = 0; d < 2; d++) begin
      if (fused[d]) n_fused[d]++;
      else if (issue_n[d] == 2) n_dual[d]++;
      else if (issue_n[d] == 1) n_single[d]++;
      if (issue_n[d] != 0) n_issue_cycles[d]++;
    end
  end

  srv_op_t prog [$];

  task automatic run(int d, output int issue_cycles);
    int i = 0, c0 = n_issue_cycles[d];
    while (i < prog.size()) begin
      @(negedge clk);
      in_valid[d] = '0;
      if (in_ready[d]) begin
        in_op[d][0] = prog[i];
        in_valid[d][0] = 1'b1;
        if (i + 1 < prog.size()) begin
          in_op[d][1] = prog[i+1];
          in_valid[d][1] = 1'b1;
        end
        i += int'(in_valid[d][0]) + int'(in_valid[d][1]);
      end
    end
    @(negedge clk);
    in_valid[d] = '0;
    while (!idle[d]) @(negedge clk);
    issue_cycles = n_issue_cycles[d] - c0;
  endtask

  task automatic compare(int d, regs_t m, string what);
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = 5'(r);
      #1;
      checks++;
      if (dbg_rdata[d] !== m[r]) begin
        failures++;
        $display("FAIL %s dut%0d r%0d got %h expected %h", what, d, r, dbg_rdata[d], m[r]);
      end
    end
  endtask

  function automatic srv_op_t mk(op_e o, int rd, int rs1, int rs2, logic [31:0] imm = '0);
    srv_op_t r;
    r.op = o; r.rd = 5'(rd); r.rs1 = 5'(rs1); r.rs2 = 5'(rs2); r.imm = imm;
    return r;
  endfunction

  int refused = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    regs_t m;
    int cyc [2], tot [2], nops;
    rst_n = 0; dbg_raddr = '0;
    for (int d = 0; d < 2; d++) begin
      in_valid[d] = '0; in_op[d] = '0;
      n_fused[d] = 0; n_dual[d] = 0; n_single[d] = 0; n_issue_cycles[d] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- random program, run and compared in chunks ----
    for (int r = 0; r < 32; r++) m[r] = '0;
    tot[0] = 0; tot[1] = 0; nops = 0;
    for (int chunk = 0; chunk < 40; chunk++) begin
      prog.delete();
      if (chunk == 0)
        for (int r = 0; r < 32; r++) prog.push_back(mk(OP_LI, r, 0, 0, $urandom));
      for (int n = 0; n < 100; n++) begin
        automatic int k = $urandom % 10;
        automatic int lim = (chunk % 2 == 0) ? 6 : 32;
        automatic int rd = $urandom % lim, rs1 = $urandom % lim, rs2 = $urandom % lim;
        if (k < 4) begin
          automatic bit g = 1'($urandom);
          automatic int rd2 = $urandom % lim;
          prog.push_back(mk(g ? OP_GMULLO : OP_MULLO, rd, rs1, rs2));
          prog.push_back(mk(g ? OP_GMULHI : OP_MULHI, rd2, rs1, rs2));
          if (rd == rs1 || rd == rs2) refused++;
        end else begin
          automatic op_e l [8] = '{OP_LI, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_ANDN, OP_MULLO};
          prog.push_back(mk(l[k % 8], rd, rs1, rs2, $urandom));
        end
      end
      foreach (prog[i]) step(m, prog[i]);
      nops += prog.size();
      run(0, cyc[0]);
      run(1, cyc[1]);
      tot[0] += cyc[0];
      tot[1] += cyc[1];
      compare(0, m, $sformatf("random MR chunk %0d", chunk));
      compare(1, m, $sformatf("random 1R chunk %0d", chunk));
    end
    cyc[0] = tot[0];
    cyc[1] = tot[1];
    $display("random program of %0d ops: %0d issue cycles with 2-R, %0d with 1-R",
             nops, cyc[0], cyc[1]);
    $display("2-R: fused=%0d dual=%0d single=%0d; 1-R: fused=%0d dual=%0d single=%0d",
             n_fused[0], n_dual[0], n_single[0], n_fused[1], n_dual[1], n_single[1]);
    checks += 6;
    if (n_fused[0] == 0)  begin failures++; $display("FAIL no fused pair"); end
    if (n_dual[0] == 0)   begin failures++; $display("FAIL no dual issue"); end
    if (n_single[0] == 0) begin failures++; $display("FAIL no single issue"); end
    if (refused == 0)     begin failures++; $display("FAIL no unsafe pair generated"); end
    if (n_fused[1] != 0)  begin failures++; $display("FAIL 1-R instance fused"); end
    if (cyc[0] >= cyc[1]) begin failures++; $display("FAIL fusion gave no gain"); end

    // ---- directed: a dependent pair must not issue together ----
    prog.delete();
    prog.push_back(mk(OP_LI, 1, 0, 0, 32'd5));
    prog.push_back(mk(OP_ADD, 2, 1, 1));
    prog.push_back(mk(OP_LI, 3, 0, 0, 32'd7));
    prog.push_back(mk(OP_MULLO, 4, 3, 2));
    foreach (prog[i]) step(m, prog[i]);
    run(0, cyc[0]);
    run(1, cyc[1]);
    compare(0, m, "dependent MR");
    compare(1, m, "dependent 1R");
    checks++;
    if (m[4] != 32'd70) begin failures++; $display("FAIL reference model"); end

    // ---- rate: 16 independent multiply pairs ----
    prog.delete();
    for (int i = 0; i < 16; i++) begin
      prog.push_back(mk(OP_MULLO, 16 + (i % 8), i % 8, 8 + (i % 8)));
      prog.push_back(mk(OP_MULHI, 24 + (i % 8), i % 8, 8 + (i % 8)));
    end
    foreach (prog[i]) step(m, prog[i]);
    run(0, cyc[0]);
    run(1, cyc[1]);
    compare(0, m, "pairs MR");
    compare(1, m, "pairs 1R");
    checks += 2;
    if (cyc[0] != 16) begin failures++; $display("FAIL 2-R pairs took %0d cycles, expected 16", cyc[0]); end
    if (cyc[1] != 32) begin failures++; $display("FAIL 1-R pairs took %0d cycles, expected 32", cyc[1]); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
