// ptlu_unit: the eight on-chip lookup tables T0-T7 and the parallel table
// lookup (ptlu) datapath.
//
// Each table holds 256 entries of one processor word (W bits), so the tables
// total 8 kB, 16 kB or 32 kB for W = 32, 64 or 128. A lookup
// ptlu.subword.table.offset.step Rd, Rs performs up to four lookups in the
// selected table in parallel. Lookup k uses byte (offset + k*step) of Rs as
// the 8-bit index (byte 0 is the least significant byte) and returns the
// low `subword` bytes of the addressed entry, placed at bytes
// [k*subword +: subword] of Rd. The number of lookups is the smaller of four
// and W/8/subword. All of that follows the original ptlu definition and its worked examples.
//
// This design's own choices: the byte position wraps modulo W/8 (which lets
// one instruction gather one AES T-table column from a 128-bit state);
// result bytes above the last lookup are zero; a subword that is not a power
// of two or wider than the word returns zero (the original design leaves such
// combinations to the programmer); the tables are loaded through a
// synchronous write port, since the original design says RC4 writes its table but
// not how.
//
// Timing: the read is combinational, so the lookup completes in the execute
// cycle of the instruction (single-cycle latency, as the original design assumes)
// and the result can be written back and used by the next instruction. The
// write takes effect at the clock edge. No reset: table contents are loaded
// by software.
module ptlu_unit
  import pax_pkg::*;
#(
  parameter int unsigned W = 128   // processor word size: 32, 64 or 128
) (
  input  logic             clk,
  // table write port
  input  logic             we,
  input  logic [2:0]       wtable,
  input  logic [7:0]       windex,
  input  logic [W-1:0]     wdata,
  // lookup
  input  logic [W-1:0]     rs,
  input  ptlu_sub_t        sub,
  output logic [W-1:0]     rd
);
  localparam int unsigned WB  = W / 8;           // bytes per word
  localparam int unsigned BW  = $clog2(WB);      // byte-position bits
  localparam int unsigned NSZ = BW + 1;          // subword sizes 1..WB

  logic [W-1:0] tables [NUM_TABLES][TABLE_ENTRIES];

  always_ff @(posedge clk) begin
    if (we) tables[wtable][windex] <= wdata;
  end

  // Index selection and the four parallel reads.
  logic [W-1:0] entry [PTLU_LOOKUPS];
  always_comb begin
    for (int k = 0; k < PTLU_LOOKUPS; k++) begin
      logic [3:0]    pos;    // W/8 divides 16, so wrapping at 16 first is exact
      logic [BW-1:0] bpos;
      logic [7:0]    idx;
      pos      = sub.offset + 4'(k) * sub.step;
      bpos     = pos[BW-1:0];
      idx      = rs[8*bpos +: 8];
      entry[k] = tables[sub.table_id][idx];
    end
  end

  // Result assembly: lookup k fills bytes [k*s +: s] with the low s bytes of
  // its entry, for the selected subword size s.
  always_comb begin
    rd = '0;
    for (int z = 0; z < NSZ; z++) begin
      if (int'(sub.subword) == (1 << z)) begin
        for (int b = 0; b < WB; b++) begin
          if ((b >> z) < PTLU_LOOKUPS)
            rd[8*b +: 8] = entry[b >> z][8*(b & ((1 << z) - 1)) +: 8];
        end
      end
    end
  end

endmodule
