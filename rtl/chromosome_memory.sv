// chromosome_memory: population store of the genetic algorithm.
//
// 2*POP chromosomes of CHROM_W bits in two banks: address bit AW-1 picks the
// bank, the low bits the individual. The current generation is read from one
// bank while the next is written into the other; swapping the bank bit
// replaces the old population. One write port and one synchronous read port
// (rdata one clock after raddr). The published design names the chromosome
// memory; the double-bank organisation is this design's choice.
module chromosome_memory
  import ehw_pkg::*;
#(
  parameter int unsigned POP = 16,
  parameter int unsigned CW  = CHROM_W,
  localparam int unsigned AW = $clog2(POP) + 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [CW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [CW-1:0] rdata
);
  logic [CW-1:0] mem [2*POP];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
