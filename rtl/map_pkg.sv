// map_pkg: shared constants, types and trellis/arithmetic functions of the
// block-wise log-MAP decoder.
//
// The decoder follows a rate-1/2 recursive systematic convolutional code of
// constraint length 3 (four trellis states). The code generators are this
// design's choice: feedback 1+D+D^2 (octal 7) and parity 1+D^2 (octal 5).
// State m = {s1, s0}, s1 being the newest register bit. For input u the
// feedback bit is a = u^s1^s0, the parity is v = a^s0 and the next state is
// {a, s1}.
//
// Metrics are signed fixed point with FRAC=2 fractional bits (units of 1/4).
// The max* operator is max(a,b) + fc(|a-b|), with the correction
// fc(d) = round(4*ln(1+exp(-d/4))) held in a small threshold table.
// The block size L = training size / MU follows the document (training size
// 24, MU = 3, so L = 8 by default); all widths are this design's choice.
package map_pkg;

  // ---- configuration -----------------------------------------------------
  // Default configuration; the top takes MU and TRAIN as parameters.
  localparam int unsigned MU_DEF     = 3;                   // training blocks per block
  localparam int unsigned TRAIN_DEF  = 24;                  // training size (trellis steps)
  localparam int unsigned L_DEF      = TRAIN_DEF / MU_DEF;  // block size
  localparam int unsigned NSLOT_DEF  = MU_DEF + 2;          // recursions sharing the processor
  localparam int unsigned NS     = 4;               // trellis states (K = 3)
  localparam int unsigned NBMEM_DEF  = 2 * (MU_DEF + 1);    // blocks held in branch metric memory

  localparam int unsigned XW     = 8;               // channel value width (x, y)
  localparam int unsigned LAW    = 10;              // a-priori value width
  localparam int unsigned BMW    = 16;              // branch metric width
  localparam int unsigned SMW    = 16;              // state metric width
  localparam int unsigned LLRW   = 18;              // LLR / extrinsic width
  localparam int unsigned NBW    = 10;              // width of the block count

  localparam logic signed [SMW-1:0] SM_NEG_INIT = -16'sd4096; // "minus infinity" for alpha_0

  typedef logic signed [BMW-1:0]  bm_t;
  typedef logic signed [SMW-1:0]  sm_t;
  typedef logic signed [LLRW-1:0] llr_t;

  // Branch metrics of one trellis step, indexed by {u, v}.
  typedef bm_t bm_vec_t [4];
  // State metrics of one trellis step, indexed by state.
  typedef sm_t sm_vec_t [NS];

  // Pipeline slots: slot 0 is the forward recursion, slot 1 the first
  // training recursion (training process 1 of the block furthest ahead),
  // slot MU+1 the backward recursion whose output feeds the LLR unit.
  localparam int unsigned SLOT_FWD = 0;
  typedef logic [2:0] slot_t;

  // ---- trellis -------------------------------------------------------------
  function automatic logic [1:0] trel_next(input logic [1:0] m, input logic u);
    logic a;
    a = u ^ m[1] ^ m[0];
    return {a, m[1]};
  endfunction

  function automatic logic trel_par(input logic [1:0] m, input logic u);
    logic a;
    a = u ^ m[1] ^ m[0];
    return a ^ m[0];
  endfunction

  // ---- max* ------------------------------------------------------------------
  // Correction term ln(1+exp(-d)) for d in units of 1/4, result in units of 1/4.
  function automatic logic [1:0] fc_lut(input logic [SMW:0] d);
    if (d == 0)      return 2'd3;
    else if (d <= 3) return 2'd2;
    else if (d <= 8) return 2'd1;
    else             return 2'd0;
  endfunction

  // max*(a, b) on LLRW-wide operands (used by the LLR unit).
  function automatic llr_t maxstar_llr(input llr_t a, input llr_t b);
    llr_t mx, df;
    logic [1:0] c;
    mx = (a >= b) ? a : b;
    df = (a >= b) ? a - b : b - a;
    c  = (df > 8) ? 2'd0 : fc_lut({{(SMW+1-4){1'b0}}, df[3:0]});
    return mx + llr_t'(c);
  endfunction

endpackage
