// bmu: branch metric calculation unit.
//
// For one trellis step it forms the log-domain branch metrics of the four
// (systematic bit u, parity bit v) pairs from the received systematic value
// x_k, the received parity value y_k and the a-priori value La_k of the
// information bit. With the metrics written as u*(x+La) + v*y the common
// constant of the bipolar form cancels in every comparison and in the final
// log-likelihood ratio, so bm[{0,0}] is always 0. The outputs are
// combinational; the branch metric memory registers them. Positive values
// favour bit 1. The metric form and the widths are this design's choice; the
// document gives the unit's function (Eq. (1), Figs. 4 and 8).
module bmu
  import map_pkg::*;
(
  input  logic signed [XW-1:0]  x,    // received systematic value (1/4 units)
  input  logic signed [XW-1:0]  y,    // received parity value (1/4 units)
  input  logic signed [LAW-1:0] la,   // a-priori value of d_k
  output bm_vec_t               bm    // bm[{u,v}]
);
  bm_t sx, py;

  always_comb begin
    sx    = bm_t'(x) + bm_t'(la);
    py    = bm_t'(y);
    bm[0] = '0;          // u=0, v=0
    bm[1] = py;          // u=0, v=1
    bm[2] = sx;          // u=1, v=0
    bm[3] = sx + py;     // u=1, v=1
  end
endmodule
