// alpha_mem: forward state metric memory.
//
// Holds the forward state metrics alpha_k of one block (L entries of NS
// metrics). The forward recursion writes block b+1 in increasing k while the
// LLR unit reads block b in decreasing k. Storing even blocks at address k
// and odd blocks at address L-1-k makes both use the same address in the
// same step, so one single-port, read-before-write memory of a single block
// is enough, which is the state metric size counted by the document. The
// address alternation is this design's choice. Timing: on a clock edge with
// en=1 the entry at addr is copied to rdata (old contents) and, if we=1,
// overwritten with wdata. rdata holds its value while en=0.
module alpha_mem
  import map_pkg::*;
#(
  parameter int unsigned DEPTH = L_DEF,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  sm_vec_t       wdata,
  output sm_vec_t       rdata
);
  logic [NS*SMW-1:0] mem [DEPTH];
  logic [NS*SMW-1:0] wword;
  logic [NS*SMW-1:0] rword;

  always_comb begin
    for (int i = 0; i < NS; i++) wword[i*SMW +: SMW] = wdata[i];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      rword <= mem[addr];
      if (we) mem[addr] <= wword;
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) rdata[i] = rword[i*SMW +: SMW];
  end
endmodule
