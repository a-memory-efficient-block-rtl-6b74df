// init_state_ctrl: initial state controller of the state metric processor.
//
// Keeps the most recent state metrics of each of the NSLOT recursions that
// share the pipelined processor (slot 0 forward, slots 1..MU training
// processes 1..MU, slot MU+1 backward). Results leaving stage 5 are written
// into the register of their slot. For the step entering stage 1 it chooses
// the starting metrics:
//   forward, first step of block 0 : alpha_0 = (0, -inf, -inf, -inf)
//   forward otherwise              : own register (continues across blocks)
//   training process 1, first step : all zero (equally likely states)
//   slot p > 1, first step         : register of slot p-1, i.e. the metric
//                                    the previous training process ended
//                                    with on the following block
//   any slot otherwise             : own register
// This hand-over chains the MU training passes and the backward pass over
// MU+1 consecutive blocks, as in the document's timing diagram. The encoder
// start state 0 and the zero start of training are this design's choices.
// Write and select are in the same clock; the processor timing guarantees
// that a slot reads its predecessor's final result before that slot
// overwrites it.
module init_state_ctrl
  import map_pkg::*;
#(
  parameter int unsigned NSLOT = NSLOT_DEF      // recursions: forward, MU training, backward
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  // result of stage 5
  input  logic    wr_valid,
  input  slot_t   wr_slot,
  input  sm_vec_t wr_data,
  // step entering stage 1
  input  slot_t   rd_slot,
  input  logic    first_step,   // first step of a block
  input  logic    fwd_start,    // first step of the first block of a frame
  output sm_vec_t sm_sel
);
  localparam int unsigned SLW = $clog2(NSLOT);
  sm_vec_t regs [NSLOT];
  logic [SLW-1:0] widx, ridx, pidx;

  assign widx = SLW'(wr_slot);
  assign ridx = SLW'(rd_slot);
  assign pidx = SLW'(rd_slot - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NSLOT; p++)
        for (int m = 0; m < NS; m++) regs[p][m] <= '0;
    end else if (en && wr_valid) begin
      regs[widx] <= wr_data;
    end
  end

  always_comb begin
    if (rd_slot == slot_t'(SLOT_FWD)) begin
      for (int m = 0; m < NS; m++)
        sm_sel[m] = fwd_start ? ((m == 0) ? '0 : SM_NEG_INIT) : regs[SLOT_FWD][m];
    end else if (!first_step) begin
      sm_sel = regs[ridx];
    end else if (rd_slot == slot_t'(1)) begin
      for (int m = 0; m < NS; m++) sm_sel[m] = '0;
    end else begin
      sm_sel = regs[pidx];
    end
  end
endmodule
