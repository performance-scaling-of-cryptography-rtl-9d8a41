// pax_core: single-issue, word-size-scalable cryptographic processor datapath
// with the parallel table lookup unit.
//
// One decoded operation is accepted per cycle (op_valid). Its source
// registers are read, it executes in one of the four functional units that
// share the result path -- ALU, shifter, dual-field multiplier, ptlu tables
// -- and the result is written to the register file at
// the end of the same cycle. Every operation therefore has single-cycle
// latency, and a ptlu result is usable by the very next operation without an
// interlock, the property the original design stresses for ptlu.
//
// Word size W is a parameter (32, 64 or 128 in the original design); the register
// file, the ALU, the shifter, the multiplier inputs and the table entries all
// scale with it. The multiplier returns one word per operation (mul.lo /
// mul.hi, and gmul.lo / gmul.hi for binary-field products).
//
// This design's own choices: instruction fetch and decode are outside this
// block (the instruction encoding is not part of the design), so the core
// takes decoded pax_op_t operations with a W-bit immediate beside them;
// OP_TWR writes table T[sub.table_id][rs1[7:0]] with rs2; 32 registers;
// a fourth register-file read port (dbg_*) lets a host inspect registers.
//
// Outputs: wb_valid/wb_rd/wb_data report, one cycle later, each register
// write (registered copy of the write-back bus).
module pax_core
  import pax_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         op_valid,
  input  pax_op_t      op,
  input  logic [W-1:0] imm,
  output logic         wb_valid,
  output logic [4:0]   wb_rd,
  output logic [W-1:0] wb_data,
  input  logic [4:0]   dbg_raddr,
  output logic [W-1:0] dbg_rdata
);
  logic [2:0][4:0]   raddr;
  logic [2:0][W-1:0] rdata;
  logic [0:0]        rf_we;
  logic [0:0][4:0]   rf_waddr;
  logic [0:0][W-1:0] rf_wdata;

  assign raddr = {dbg_raddr, op.rs2, op.rs1};

  regfile #(.W(W), .NREGS(NUM_REGS), .NR(3), .NW(1)) u_rf (
    .clk, .rst_n, .raddr, .rdata, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  logic [W-1:0] a, b;
  assign a = rdata[0];
  assign b = rdata[1];
  assign dbg_rdata = rdata[2];

  // ALU
  alu_op_e      alu_op;
  logic [W-1:0] alu_b, alu_y;
  always_comb begin
    alu_b = b;
    unique case (op.op)
      OP_SUB:  alu_op = ALU_SUB;
      OP_AND:  alu_op = ALU_AND;
      OP_OR:   alu_op = ALU_OR;
      OP_XOR:  alu_op = ALU_XOR;
      OP_ANDN: alu_op = ALU_ANDN;
      OP_LI:   begin alu_op = ALU_PASSB; alu_b = imm; end
      default: alu_op = ALU_ADD;
    endcase
  end
  pax_alu #(.W(W)) u_alu (.op(alu_op), .a, .b(alu_b), .y(alu_y));

  // Shifter: fixed amount from the operation, variable amount from rs2.
  sh_op_e       sh_op;
  logic [W-1:0] sh_y;
  always_comb begin
    unique case (op.op)
      OP_SRL:  sh_op = SH_SRL;
      OP_ROL:  sh_op = SH_ROL;
      OP_ROR:  sh_op = SH_ROR;
      default: sh_op = SH_SLL;
    endcase
  end
  pax_shifter #(.W(W)) u_sh (
    .op(sh_op), .a, .amt(op.use_imm ? op.shamt : b[6:0]), .y(sh_y)
  );

  // Dual-field multiplier, one-word result.
  logic [W-1:0] mul_lo, mul_hi;
  dual_field_mul #(.W(W)) u_mul (
    .mode(op.op inside {OP_GMULLO, OP_GMULHI}), .a, .b, .lo(mul_lo), .hi(mul_hi)
  );

  // Lookup tables.
  logic [W-1:0] tlu_y;
  ptlu_unit #(.W(W)) u_tlu (
    .clk, .we(op_valid && op.op == OP_TWR), .wtable(op.sub.table_id),
    .windex(a[7:0]), .wdata(b), .rs(a), .sub(op.sub), .rd(tlu_y)
  );

  // Result bus.
  logic [W-1:0] result;
  always_comb begin
    unique case (op.op)
      OP_SLL, OP_SRL, OP_ROL, OP_ROR: result = sh_y;
      OP_MULLO, OP_GMULLO:            result = mul_lo;
      OP_MULHI, OP_GMULHI:            result = mul_hi;
      OP_PTLU:                        result = tlu_y;
      default:                        result = alu_y;
    endcase
  end

  assign rf_we[0]    = op_valid && writes_rd(op.op);
  assign rf_waddr[0] = op.rd;
  assign rf_wdata[0] = result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_rd    <= '0;
      wb_data  <= '0;
    end else begin
      wb_valid <= rf_we[0];
      wb_rd    <= op.rd;
      wb_data  <= result;
    end
  end
endmodule
