// regfile: multi-ported register file.
//
// NREGS registers of W bits with NR combinational read ports and NW
// synchronous write ports. When two write ports address the same register
// in one cycle, the higher-numbered port wins, so a datapath that places
// the later instruction of a pair on the higher port keeps program order.
// A write becomes visible to reads in the next cycle. Reset clears every
// register. The original design only names the register file; the port count per
// use (two reads and one write for the single-issue core, four reads and two
// writes for the dual-issue datapath) follows its block diagrams, and the
// size, reset and write priority are this design's choices.
module regfile #(
  parameter int unsigned W     = 32,
  parameter int unsigned NREGS = 32,
  parameter int unsigned NR    = 2,
  parameter int unsigned NW    = 1,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][W-1:0]  rdata,
  input  logic [NW-1:0]         we,
  input  logic [NW-1:0][AW-1:0] waddr,
  input  logic [NW-1:0][W-1:0]  wdata
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) rdata[p] = regs[raddr[p]];
  end
endmodule
