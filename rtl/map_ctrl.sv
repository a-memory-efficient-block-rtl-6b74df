// map_ctrl: decoding controller (schedule of time frames, steps and slots).
//
// A frame of M blocks of L bits is decoded in M+2*MU+1 time frames of L
// trellis steps; each step takes NSLOT = MU+2 clocks, one per pipeline slot
// of the time-shared state metric processor. In time frame f:
//   branch metric unit   block f          (zero metrics for f >= M)
//   training process p   block f-(2p-1),  p = 1..MU
//   backward recursion   block f-(2MU+1)  (and LLR output)
//   forward recursion    block f-2MU
// which is the document's timing diagram for MU = 3 (branch metrics of
// block b in frame b, training of block b+3, b+2, b+1 in frames b+4, b+5,
// b+6, forward metrics of block b in frame b+6, backward metrics and output
// of block b in frame b+7). Forward steps run with k = 0..L-1, backward and
// training steps with k = L-1..0. Padding frames past the last block give
// the training passes equal (zero) branch metrics, so the last blocks start
// from equally likely states: the frame is treated as unterminated, which is
// this design's choice.
// Interface: start (with num_blocks = M >= 1) begins a frame when idle. A
// channel symbol is taken in the first clock (phase 0) of each step of time
// frames 0..M-1 with a valid/ready handshake; while it is missing, en stays
// low and the whole decoder holds (a stall). done pulses one clock after the
// LLR pipeline has drained.
module map_ctrl
  import map_pkg::*;
#(
  parameter int unsigned MU    = MU_DEF,               // training blocks per block
  parameter int unsigned L     = L_DEF,                // block size
  parameter int unsigned NSLOT = MU + 2,
  parameter int unsigned NBMEM = 2 * (MU + 1),         // blocks in branch metric memory (power of 2 not needed)
  parameter int unsigned BMAW  = $clog2(NBMEM * L),
  parameter int unsigned AMAW  = $clog2(L),
  parameter int unsigned TW    = NBW + $clog2(L)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NBW-1:0]  num_blocks,
  input  logic            in_valid,
  output logic            in_ready,
  output logic            busy,
  output logic            done,
  output logic            en,          // global advance
  output logic            stall,       // waiting for a channel symbol
  // branch metric unit / memory write
  output logic            bm_use_in,   // 1: real symbol, 0: padding (zeros)
  output logic            bm_we,
  output logic [BMAW-1:0] bm_waddr,
  // step entering stage 1 of the processor
  output logic            proc_valid,
  output slot_t           proc_slot,
  output logic            proc_bwd,
  output logic            first_step,
  output logic            fwd_start,
  output logic [BMAW-1:0] bm_raddr,
  // forward state metric memory
  output logic            am_en,
  output logic            am_we,
  output logic [AMAW-1:0] am_addr,
  // LLR unit
  output logic            llr_valid,
  output logic [TW-1:0]   llr_tag
);
  localparam int unsigned SW  = $clog2(L);
  localparam int unsigned SLOT_BWD = NSLOT - 1;
  localparam int unsigned FW  = NBW + 1;          // frame counter width
  localparam int unsigned BW  = NBW + 2;          // signed block index width
  localparam int unsigned DRAIN_CYC = 4;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t           state;
  logic [NBW-1:0]   nblk;
  logic [FW-1:0]    frame;
  logic [SW-1:0]    step;
  slot_t            phase;
  logic [2:0]       dcnt;

  logic signed [BW-1:0] blk;
  logic [SW-1:0]        kpos;
  logic                 blk_valid;
  logic                 need_in;

  always_comb begin
    logic [BW-1:0] off;
    off       = (phase == slot_t'(SLOT_FWD)) ? BW'(2 * MU) : BW'({phase, 1'b0} - 1'b1);
    blk       = $signed(BW'(frame)) - $signed(off);
    kpos      = (phase == slot_t'(SLOT_FWD)) ? step : SW'(L - 1) - step;
    blk_valid = (blk >= 0) && (blk < $signed(BW'(nblk)));
  end

  assign busy      = (state != S_IDLE);
  assign need_in   = (state == S_RUN) && (phase == '0) && (frame < FW'(nblk));
  assign in_ready  = need_in;
  assign stall     = need_in && !in_valid;
  assign en        = (state == S_RUN) ? !stall : (state == S_DRAIN);

  assign bm_use_in = need_in;
  assign bm_we     = (state == S_RUN) && (phase == '0);
  assign bm_waddr  = BMAW'((frame % FW'(NBMEM)) * FW'(L) + FW'(step));

  assign proc_valid = (state == S_RUN) && (blk >= 0);
  assign proc_slot  = phase;
  assign proc_bwd   = (phase != slot_t'(SLOT_FWD));
  assign first_step = (step == '0);
  assign fwd_start  = (phase == slot_t'(SLOT_FWD)) && (step == '0) && (blk == 0);
  assign bm_raddr   = BMAW'((unsigned'(blk) % BW'(NBMEM)) * BW'(L) + BW'(kpos));

  // Even forward blocks are stored at address k, odd ones at L-1-k, so the
  // backward read of block b-1 hits the address written for block b.
  assign am_en   = (state == S_RUN) && (phase == slot_t'(SLOT_FWD)) && en;
  assign am_we   = blk_valid;
  assign am_addr = blk[0] ? AMAW'(SW'(L - 1) - step) : AMAW'(step);

  assign llr_valid = (state == S_RUN) && (phase == slot_t'(SLOT_BWD)) && blk_valid;
  assign llr_tag   = TW'(unsigned'(blk) * BW'(L) + BW'(kpos));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      nblk  <= '0;
      frame <= '0;
      step  <= '0;
      phase <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start && num_blocks != '0) begin
          state <= S_RUN;
          nblk  <= num_blocks;
          frame <= '0;
          step  <= '0;
          phase <= '0;
        end
        S_RUN: if (en) begin
          if (phase == slot_t'(NSLOT - 1)) begin
            phase <= '0;
            if (step == SW'(L - 1)) begin
              step <= '0;
              if (frame == FW'(nblk) + FW'(2 * MU)) begin
                state <= S_DRAIN;
                dcnt  <= '0;
              end else begin
                frame <= frame + 1'b1;
              end
            end else begin
              step <= step + 1'b1;
            end
          end else begin
            phase <= phase + 1'b1;
          end
        end
        S_DRAIN: begin
          dcnt <= dcnt + 1'b1;
          if (dcnt == 3'(DRAIN_CYC - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A symbol is only offered to the decoder when it is asked for.
  property p_ready_only_in_run;
    @(posedge clk) disable iff (!rst_n) in_ready |-> (state == S_RUN);
  endproperty
  a_ready_only_in_run: assert property (p_ready_only_in_run);
endmodule
