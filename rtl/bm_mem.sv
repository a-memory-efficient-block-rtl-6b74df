// bm_mem: branch metric memory.
//
// A circular buffer of NBLK blocks of L entries; an entry holds the four
// branch metrics of one trellis step. Block b lives in region b mod NBLK.
// The branch metric unit writes block b during time frame b and the last
// reader (the backward recursion) reads it during frame b+2*MU+1, so
// 2*(MU+1) regions are needed, as in the document's memory count. One
// synchronous write port and one combinational read port: the time-shared
// state metric processor needs only one read per clock. The single read port
// and the asynchronous read are this design's choice.
module bm_mem
  import map_pkg::*;
#(
  parameter int unsigned DEPTH = NBMEM_DEF * L_DEF,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  bm_vec_t       wdata,
  input  logic [AW-1:0] raddr,
  output bm_vec_t       rdata
);
  logic [4*BMW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wdata[3], wdata[2], wdata[1], wdata[0]};
  end

  always_comb begin
    for (int i = 0; i < 4; i++) rdata[i] = mem[raddr][i*BMW +: BMW];
  end
endmodule
