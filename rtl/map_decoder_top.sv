// map_decoder_top: memory-efficient block-wise log-MAP (SISO) decoder.
//
// A frame of M blocks of L = 8 bits is decoded with a block size of one
// third (1/MU) of the 24-step training size (defaults; MU = 2..6 and the
// training size are parameters, the document's main configuration is
// MU = 3). The backward metrics of each
// block start from metrics trained over the MU following blocks by MU
// training passes that hand their end metrics on, block by block. One
// (MU+2)-stage pipelined state metric processor is shared, one slot per clock,
// by the forward recursion, the MU training passes and the backward
// recursion. The branch metric memory holds 2*(MU+1) blocks and the forward
// state metric memory one block.
//
// Data path per trellis step (MU+2 clocks):
//   bmu -> bm_mem -> init_state_ctrl / sm_processor (MU+2 slots) -> alpha_mem
//   backward slot + alpha_mem + bm_mem -> llr_unit -> out_*
// Interface: pulse start with num_blocks = M (1..1023). Feed M*L channel
// symbols (x_k, y_k, La_k) in bit order with in_valid/in_ready; the decoder
// stalls while a symbol is missing. Results come out with out_valid, one per
// step from time frame 2*MU+1 on, block by block, each block in reverse bit
// order; out_idx gives the bit index k. There is no output back-pressure.
// The block/training organisation, the schedule and the processor stages
// follow the document; code generators, widths, the fixed-point scaling,
// the interface and the frame ends (start state 0, unterminated end) are
// this design's choices.
module map_decoder_top
  import map_pkg::*;
#(
  parameter int unsigned MU    = MU_DEF,      // block size = training size / MU (2..6)
  parameter int unsigned TRAIN = TRAIN_DEF,   // training size in trellis steps
  parameter int unsigned L     = TRAIN / MU   // block size
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [NBW-1:0]           num_blocks,
  output logic                     busy,
  output logic                     done,
  // channel symbols
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [XW-1:0]     in_x,
  input  logic signed [XW-1:0]     in_y,
  input  logic signed [LAW-1:0]    in_la,
  // decoded output
  output logic                     out_valid,
  output logic [NBW+$clog2(L)-1:0] out_idx,
  output llr_t                     out_llr,
  output llr_t                     out_ext,
  output logic                     out_hard
);
  localparam int unsigned NSLOT = MU + 2;
  localparam int unsigned NBMEM = 2 * (MU + 1);
  localparam int unsigned BMAW = $clog2(NBMEM * L);
  localparam int unsigned AMAW = $clog2(L);
  localparam int unsigned TW   = NBW + $clog2(L);

  logic            en;
  logic            bm_use_in, bm_we;
  logic [BMAW-1:0] bm_waddr, bm_raddr;
  logic            proc_valid, proc_bwd, first_step, fwd_start;
  slot_t           proc_slot;
  logic            am_en, am_we;
  logic [AMAW-1:0] am_addr;
  logic            llr_valid;
  logic [TW-1:0]   llr_tag;

  bm_vec_t bm_new, bm_rd;
  sm_vec_t sm_sel, sm_res, alpha_rd;
  logic    res_valid;
  slot_t   res_slot;

  map_ctrl #(.MU(MU), .L(L), .NSLOT(NSLOT), .NBMEM(NBMEM)) u_ctrl (
    .clk, .rst_n, .start, .num_blocks, .in_valid, .in_ready, .busy, .done,
    .en, .stall(), .bm_use_in, .bm_we, .bm_waddr,
    .proc_valid, .proc_slot, .proc_bwd, .first_step, .fwd_start, .bm_raddr,
    .am_en, .am_we, .am_addr, .llr_valid, .llr_tag
  );

  bmu u_bmu (
    .x  (bm_use_in ? in_x  : '0),
    .y  (bm_use_in ? in_y  : '0),
    .la (bm_use_in ? in_la : '0),
    .bm (bm_new)
  );

  bm_mem #(.DEPTH(NBMEM * L)) u_bm_mem (
    .clk, .we(bm_we && en), .waddr(bm_waddr), .wdata(bm_new),
    .raddr(bm_raddr), .rdata(bm_rd)
  );

  init_state_ctrl #(.NSLOT(NSLOT)) u_isc (
    .clk, .rst_n, .en,
    .wr_valid(res_valid), .wr_slot(res_slot), .wr_data(sm_res),
    .rd_slot(proc_slot), .first_step, .fwd_start, .sm_sel
  );

  sm_processor #(.NSLOT(NSLOT)) u_smp (
    .clk, .rst_n, .en,
    .in_valid(proc_valid), .in_slot(proc_slot), .in_bwd(proc_bwd),
    .sm_in(sm_sel), .bm_in(bm_rd),
    .out_valid(res_valid), .out_slot(res_slot), .sm_out(sm_res)
  );

  alpha_mem #(.DEPTH(L)) u_alpha_mem (
    .clk, .en(am_en), .we(am_we), .addr(am_addr), .wdata(sm_sel), .rdata(alpha_rd)
  );

  llr_unit #(.TW(TW)) u_llr (
    .clk, .rst_n, .en,
    .in_valid(llr_valid), .in_tag(llr_tag),
    .alpha(alpha_rd), .beta(sm_sel), .bm(bm_rd),
    .out_valid, .out_tag(out_idx), .out_llr, .out_ext, .out_hard
  );
endmodule
