// mr_dual_issue_dp: 2-way in-order superscalar datapath with one dual-field
// multiplier that can return a two-word result.
//
// Structure, as in the original design: a register file with four read ports and
// two result buses; slot A has an ALU; slot B has an ALU and the multiplier,
// which share slot B's result bus. With the two-word-result (2-R) change the
// multiplier drives its low half onto bus A and its high half onto bus B in
// the same cycle, so a mul.lo/mul.hi pair with the same sources executes as
// one multiply. MR_EN = 0 gives the one-word-result
// baseline, where mul.lo and mul.hi each take a multiply.
//
// Operation: decoded operations enter a QDEPTH-entry issue window, up to two
// per cycle (in_valid[0] for the older, in_valid[1] for the younger; in_ready
// means two free entries). Each cycle the two oldest entries are examined:
//   * fused:  mr_pair_detect finds a mul.lo/mul.hi pair; both retire.
//   * dual:   both retire when they are not both multiplies, the younger
//             does not read the older's destination, and they do not write
//             the same register; a multiply takes slot B, the other slot A.
//   * single: otherwise the oldest retires alone.
// Operations execute and write back in their issue cycle (single-cycle
// latency), so a dependent operation can issue in the next cycle. The issue
// rules, window size, single-cycle execution and the operation set
// (ALU operations, load-immediate, the four multiplies) are this design's
// choices; the original design describes only the datapath and the pair detection.
//
// issue_n (0..2) and issue_fused report what issued this cycle.
module mr_dual_issue_dp
  import pax_pkg::*;
#(
  parameter int unsigned W      = 32,
  parameter int unsigned QDEPTH = 8,
  parameter bit          MR_EN  = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    in_valid,
  input  srv_op_t [1:0] in_op,
  output logic          in_ready,
  output logic [1:0]    issue_n,
  output logic          issue_fused,
  output logic          idle,
  input  logic [4:0]    dbg_raddr,
  output logic [W-1:0]  dbg_rdata
);
  localparam int unsigned QW = $clog2(QDEPTH);

  // ---------------- issue window ----------------
  srv_op_t        q [QDEPTH];
  logic [QW-1:0]  head, tail;
  logic [QW:0]    count;
  logic [1:0]     n_push, n_pop;

  assign in_ready = (count <= (QW+1)'(QDEPTH - 2));
  assign n_push   = in_ready ? (2'(in_valid[0]) + 2'(in_valid[0] & in_valid[1])) : 2'd0;

  srv_op_t h0, h1;
  logic    v0, v1;
  assign h0 = q[head];
  assign h1 = q[QW'(head + 1'b1)];
  assign v0 = count >= 1;
  assign v1 = count >= 2;

  // ---------------- issue decision ----------------
  logic fuse, dual, h0_mul, h1_mul, raw, waw;
  mr_pair_detect #(.MR_EN(MR_EN)) u_det (.v0, .op0(h0), .v1, .op1(h1), .fuse);

  always_comb begin
    h0_mul = is_mul(h0.op);
    h1_mul = is_mul(h1.op);
    raw    = writes_rd(h0.op) && h1.op != OP_LI && (h1.rs1 == h0.rd || h1.rs2 == h0.rd);
    waw    = writes_rd(h0.op) && writes_rd(h1.op) && h0.rd == h1.rd;
    dual   = v1 && !fuse && !(h0_mul && h1_mul) && !raw && !waw;
    n_pop  = (fuse || dual) ? 2'd2 : (v0 ? 2'd1 : 2'd0);
  end

  // Slot assignment: a multiply always goes to slot B.
  srv_op_t opA, opB;
  logic    vA, vB;
  always_comb begin
    opA = '0; opB = '0; vA = 1'b0; vB = 1'b0;
    if (fuse) begin
      opB = h0; vB = 1'b1;
    end else if (dual) begin
      if (h0_mul) begin opB = h0; opA = h1; end
      else        begin opA = h0; opB = h1; end
      vA = 1'b1; vB = 1'b1;
    end else if (v0) begin
      if (h0_mul) begin opB = h0; vB = 1'b1; end
      else        begin opA = h0; vA = 1'b1; end
    end
  end

  // ---------------- register file ----------------
  logic [4:0][4:0]   raddr;
  logic [4:0][W-1:0] rdata;
  logic [1:0]        we;
  logic [1:0][4:0]   waddr;
  logic [1:0][W-1:0] wdata;
  assign raddr = {dbg_raddr, opB.rs2, opB.rs1, opA.rs2, opA.rs1};
  assign dbg_rdata = rdata[4];

  regfile #(.W(W), .NREGS(NUM_REGS), .NR(5), .NW(2)) u_rf (
    .clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata
  );

  // ---------------- functional units ----------------
  function automatic alu_op_e alu_sel(op_e op);
    unique case (op)
      OP_SUB:  return ALU_SUB;
      OP_AND:  return ALU_AND;
      OP_OR:   return ALU_OR;
      OP_XOR:  return ALU_XOR;
      OP_ANDN: return ALU_ANDN;
      OP_LI:   return ALU_PASSB;
      default: return ALU_ADD;
    endcase
  endfunction

  logic [W-1:0] yA, yB, mlo, mhi;
  pax_alu #(.W(W)) u_aluA (.op(alu_sel(opA.op)), .a(rdata[0]),
                           .b(opA.op == OP_LI ? W'(opA.imm) : rdata[1]), .y(yA));
  pax_alu #(.W(W)) u_aluB (.op(alu_sel(opB.op)), .a(rdata[2]),
                           .b(opB.op == OP_LI ? W'(opB.imm) : rdata[3]), .y(yB));
  dual_field_mul #(.W(W)) u_mul (.mode(opB.op inside {OP_GMULLO, OP_GMULHI}),
                                 .a(rdata[2]), .b(rdata[3]), .lo(mlo), .hi(mhi));

  // ---------------- result buses ----------------
  always_comb begin
    we    = '0;
    waddr = '0;
    wdata = '0;
    if (fuse) begin
      we    = 2'b11;
      waddr = {h1.rd, h0.rd};
      wdata = {mhi, mlo};            // bus A: low half, bus B: high half
    end else begin
      we[0]    = vA && writes_rd(opA.op);
      waddr[0] = opA.rd;
      wdata[0] = yA;
      we[1]    = vB && writes_rd(opB.op);
      waddr[1] = opB.rd;
      unique case (opB.op)
        OP_MULLO, OP_GMULLO: wdata[1] = mlo;
        OP_MULHI, OP_GMULHI: wdata[1] = mhi;
        default:             wdata[1] = yB;
      endcase
    end
  end

  assign issue_n     = n_pop;
  assign issue_fused = fuse;
  assign idle        = (count == 0);

  // ---------------- window pointers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (n_push >= 2'd1) q[tail] <= in_op[0];
      if (n_push == 2'd2) q[QW'(tail + 1'b1)] <= in_op[1];
      tail  <= QW'(tail + QW'(n_push));
      head  <= QW'(head + QW'(n_pop));
      count <= count + (QW+1)'(n_push) - (QW+1)'(n_pop);
    end
  end

  // Handshake rule: the younger slot is only valid together with the older.
  a_in_order: assert property (@(posedge clk) disable iff (!rst_n)
                                !(in_valid[1] && !in_valid[0]))
    else $error("in_valid[1] without in_valid[0]");
endmodule
