// pax_pkg: types and constants shared by the client core (PAX-style, with the
// parallel table lookup instruction) and the server dual-issue datapath with
// the two-word-result multiplier.
//
// The operation set is the one the cipher kernels need: add/subtract, logical
// operations, shifts and fixed/variable rotates, integer and binary-field
// (carry-less) multiplication with low/high result selection, the ptlu table
// lookup and a table write. The binary encoding of instructions is not part of
// this design: both datapaths take already-decoded operations (pax_op_t,
// srv_op_t), so the op codes below are this design's own numbering.
package pax_pkg;

  // Number of on-chip lookup tables (T0-T7) and entries per table.
  localparam int unsigned NUM_TABLES    = 8;
  localparam int unsigned TABLE_ENTRIES = 256;
  // Maximum number of lookups one ptlu performs.
  localparam int unsigned PTLU_LOOKUPS  = 4;
  // Architectural registers (this design's choice).
  localparam int unsigned NUM_REGS      = 32;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_LI     = 5'd1,   // rd <- immediate
    OP_ADD    = 5'd2,
    OP_SUB    = 5'd3,
    OP_AND    = 5'd4,
    OP_OR     = 5'd5,
    OP_XOR    = 5'd6,
    OP_ANDN   = 5'd7,   // rs1 & ~rs2
    OP_SLL    = 5'd8,
    OP_SRL    = 5'd9,
    OP_ROL    = 5'd10,
    OP_ROR    = 5'd11,
    OP_MULLO  = 5'd12,  // integer product, low word
    OP_MULHI  = 5'd13,  // integer product, high word
    OP_GMULLO = 5'd14,  // binary-field (carry-less) product, low word
    OP_GMULHI = 5'd15,  // binary-field product, high word
    OP_PTLU   = 5'd16,  // parallel table lookup
    OP_TWR    = 5'd17   // table write: T[table][rs1[7:0]] <- rs2
  } op_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_ANDN, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_SLL, SH_SRL, SH_ROL, SH_ROR
  } sh_op_e;

  // ptlu sub-operations: ptlu.subword.table.offset.step
  typedef struct packed {
    logic [4:0] subword;  // bytes read per lookup: 1, 2, 4, 8 or 16
    logic [2:0] table_id; // T0..T7
    logic [3:0] offset;   // byte of Rs used as the first index
    logic [3:0] step;     // distance in bytes between successive indices
  } ptlu_sub_t;

  // Decoded client (PAX) operation. Shift amounts come from rs2 unless
  // use_imm is set, then from shamt (fixed rotate/shift). The full-word
  // immediate of OP_LI travels beside this struct since its width follows
  // the core's word size.
  typedef struct packed {
    op_e        op;
    logic [4:0] rd;
    logic [4:0] rs1;
    logic [4:0] rs2;
    logic       use_imm;
    logic [6:0] shamt;
    ptlu_sub_t  sub;
  } pax_op_t;

  // Decoded server operation (32-bit fixed word size).
  typedef struct packed {
    op_e         op;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [31:0] imm;
  } srv_op_t;

  function automatic logic is_mul(op_e op);
    return op inside {OP_MULLO, OP_MULHI, OP_GMULLO, OP_GMULHI};
  endfunction

  // Operations that write a destination register.
  function automatic logic writes_rd(op_e op);
    return !(op inside {OP_NOP, OP_TWR});
  endfunction

endpackage
