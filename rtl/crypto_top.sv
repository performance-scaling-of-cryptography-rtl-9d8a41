// crypto_top: the two cryptographic processing datapaths side by side.
//
//   * Client: pax_core, a single-issue processor datapath whose word size
//     scales (PAX_W, 128 bits by default) and which carries eight 256-entry
//     on-chip tables with the parallel table lookup (ptlu) operation. It is
//     aimed at symmetric-key ciphers such as AES on mobile devices.
//   * Server: mr_dual_issue_dp, a fixed 32-bit 2-way superscalar datapath
//     whose dual-field multiplier returns both product words at once, so that
//     mul.lo/mul.hi pairs issue as one operation. It is aimed at the
//     multi-precision multiplication of public-key algorithms (RSA, binary-
//     field elliptic curves) on servers whose instruction set cannot change.
//
// The two do not share state; each has its own decoded-operation input,
// write-back or issue status outputs and register inspection port, brought
// out with prefixes c_ (client) and s_ (server). Both are single-clock,
// active-low asynchronous reset. Instruction fetch and decode are not part
// of this design: both datapaths are driven with decoded operations.
module crypto_top
  import pax_pkg::*;
#(
  parameter int unsigned PAX_W    = 128,
  parameter int unsigned SRV_W    = 32,
  parameter int unsigned SRV_QDEPTH = 8,
  parameter bit          SRV_MR_EN  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // client core
  input  logic              c_op_valid,
  input  pax_op_t           c_op,
  input  logic [PAX_W-1:0]  c_imm,
  output logic              c_wb_valid,
  output logic [4:0]        c_wb_rd,
  output logic [PAX_W-1:0]  c_wb_data,
  input  logic [4:0]        c_dbg_raddr,
  output logic [PAX_W-1:0]  c_dbg_rdata,
  // server datapath
  input  logic [1:0]        s_in_valid,
  input  srv_op_t [1:0]     s_in_op,
  output logic              s_in_ready,
  output logic [1:0]        s_issue_n,
  output logic              s_issue_fused,
  output logic              s_idle,
  input  logic [4:0]        s_dbg_raddr,
  output logic [SRV_W-1:0]  s_dbg_rdata
);
  pax_core #(.W(PAX_W)) u_client (
    .clk, .rst_n, .op_valid(c_op_valid), .op(c_op), .imm(c_imm),
    .wb_valid(c_wb_valid), .wb_rd(c_wb_rd), .wb_data(c_wb_data),
    .dbg_raddr(c_dbg_raddr), .dbg_rdata(c_dbg_rdata)
  );

  mr_dual_issue_dp #(.W(SRV_W), .QDEPTH(SRV_QDEPTH), .MR_EN(SRV_MR_EN)) u_server (
    .clk, .rst_n, .in_valid(s_in_valid), .in_op(s_in_op), .in_ready(s_in_ready),
    .issue_n(s_issue_n), .issue_fused(s_issue_fused), .idle(s_idle),
    .dbg_raddr(s_dbg_raddr), .dbg_rdata(s_dbg_rdata)
  );
endmodule
