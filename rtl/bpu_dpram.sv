// Simple dual-port byte memory used by the memory-based permutation unit.
//
// DEPTH words of WIDTH bits with one write port and one read port that work
// in the same clock cycle, which is what lets the permutation unit read the
// operands of one access while it writes back the results of an earlier one.
// Writes take effect at the clock edge; reads are synchronous, the word
// appearing on rdata one cycle after re. A read and a write of the same
// address in the same cycle return the old word. The contents are not reset.
// The memory type follows the published unit; the read latency and
// read-during-write behaviour are this design's choices, matching common
// on-chip block RAMs.
module bpu_dpram #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
