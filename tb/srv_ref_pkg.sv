// srv_ref_pkg: testbench-only sequential reference for the server
// datapath's operations, one operation at a time in program order, on a
// 32 x 32-bit register array.
package srv_ref_pkg;
  import pax_pkg::*;

  typedef logic [31:0] regs_t [32];

  function automatic logic [63:0] clmul32(logic [31:0] a, logic [31:0] b);
    logic [63:0] r = '0;
    for (int i = 0; i < 32; i++) if (b[i]) r ^= 64'(a) << i;
    return r;
  endfunction

  function automatic void step(ref regs_t r, input srv_op_t o);
    logic [31:0] a = r[o.rs1], b = r[o.rs2];
    logic [63:0] p = 64'(a) * 64'(b);
    logic [63:0] g = clmul32(a, b);
    case (o.op)
      OP_LI:     r[o.rd] = o.imm;
      OP_ADD:    r[o.rd] = a + b;
      OP_SUB:    r[o.rd] = a - b;
      OP_AND:    r[o.rd] = a & b;
      OP_OR:     r[o.rd] = a | b;
      OP_XOR:    r[o.rd] = a ^ b;
      OP_ANDN:   r[o.rd] = a & ~b;
      OP_MULLO:  r[o.rd] = p[31:0];
      OP_MULHI:  r[o.rd] = p[63:32];
      OP_GMULLO: r[o.rd] = g[31:0];
      OP_GMULHI: r[o.rd] = g[63:32];
      default: ;
    endcase
  endfunction
endpackage
