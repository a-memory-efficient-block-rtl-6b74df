// llr_unit: extrinsic information processor and hard decision unit.
//
// Computes, for trellis step k,
//   L(d_k) = max*_m [alpha_k(m) + bm(m,u=1) + beta_k+1(next(m,1))]
//          - max*_m [alpha_k(m) + bm(m,u=0) + beta_k+1(next(m,0))]
// (the log-domain form of the document's Eq. (2)), the extrinsic value
// Le = L - (x_k + La_k) that goes to the other constituent decoder, and the
// hard decision d_k = (L > 0). Three register stages: the eight branch sums,
// two max* of pairs per bit value, the final max* and subtraction. A result
// appears three enabled clocks after its inputs; in_tag (the bit index) is
// carried along. The document names the unit and its function; the pipeline
// split, the widths and taking L = 0 as bit 0 are this design's choices.
module llr_unit
  import map_pkg::*;
#(
  parameter int unsigned TW = NBW + $clog2(L_DEF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          in_valid,
  input  logic [TW-1:0] in_tag,
  input  sm_vec_t       alpha,   // alpha_k
  input  sm_vec_t       beta,    // beta_k+1
  input  bm_vec_t       bm,      // branch metrics of step k
  output logic          out_valid,
  output logic [TW-1:0] out_tag,
  output llr_t          out_llr,
  output llr_t          out_ext,
  output logic          out_hard
);
  typedef llr_t sum_t [NS][2];

  logic v1, v2;
  logic [TW-1:0] t1, t2;
  sum_t sum1;
  llr_t pr2 [2][2];      // [u][pair]
  llr_t sx1, sx2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else if (en) begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      // stage 1: branch sums
      for (int m = 0; m < NS; m++) begin
        for (int u = 0; u < 2; u++) begin
          logic [1:0] nx;
          logic       pv;
          nx = trel_next(2'(m), u[0]);
          pv = trel_par(2'(m), u[0]);
          sum1[m][u] <= llr_t'(alpha[m]) + llr_t'(bm[{u[0], pv}]) + llr_t'(beta[nx]);
        end
      end
      sx1 <= llr_t'(bm[2]);
      t1  <= in_tag;
      // stage 2: max* of state pairs
      for (int u = 0; u < 2; u++) begin
        pr2[u][0] <= maxstar_llr(sum1[0][u], sum1[1][u]);
        pr2[u][1] <= maxstar_llr(sum1[2][u], sum1[3][u]);
      end
      sx2 <= sx1;
      t2  <= t1;
      // stage 3: final max*, LLR, extrinsic value, hard decision
      begin
        llr_t l1, l0, lv;
        l1 = maxstar_llr(pr2[1][0], pr2[1][1]);
        l0 = maxstar_llr(pr2[0][0], pr2[0][1]);
        lv = l1 - l0;
        out_llr  <= lv;
        out_ext  <= lv - sx2;
        out_hard <= (lv > 0);
        out_tag  <= t2;
      end
    end
  end
endmodule
