// sm_processor: pipelined, time-shared state metric processor.
//
// One add-compare-select (max*) recursion step for all NS states, cut into
// pipeline stages. With the default NSLOT = MU+2 = 5 these are the five
// stages of the document's metric processor:
//   stage 1  trellis MUX: pick, for every state, the two (branch metric,
//            state metric) pairs of its incoming (forward) or outgoing
//            (backward) trellis branches
//   stage 2  two adders: a = SM + BM, b = SM' + BM'
//   stage 3  subtractor a-b, ABS of the difference, selection MUX max(a,b)
//   stage 4  correction LUT fc(|a-b|) and adder: max*(a,b)
//   stage 5  normalization: subtract the new metric of state 0
// Registers sit between the stages; the last stage is combinational and its
// result is stored by the initial state controller. A step entering stage 1
// in clock c leaves the last stage in clock c+NSLOT-1 and its metric is
// usable in stage 1 again in clock c+NSLOT, so NSLOT independent recursions
// (one forward, MU training, one backward) share the pipeline, one per
// clock: the time-shared operation the document describes. in_slot tags
// each step so that its result goes back to its own recursion.
// The document gives the (MU+2)-stage rule and the stage split for MU = 3.
// For other MU this design's choice is: NSLOT = 4 merges stages 3 and 4 into
// one; NSLOT > 5 adds NSLOT-5 further registers after the LUT adder (to be
// spread over the ACS by retiming). State 0 as normalization reference, the
// LUT contents, the widths and processing all states side by side are also
// this design's choices.
module sm_processor
  import map_pkg::*;
#(
  parameter int unsigned NSLOT = NSLOT_DEF   // pipeline depth = recursions, 4..8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,         // global advance; the pipeline holds when 0
  input  logic    in_valid,   // stage 1 carries a step
  input  slot_t   in_slot,
  input  logic    in_bwd,     // 0: forward recursion, 1: backward recursion
  input  sm_vec_t sm_in,      // metrics of step k (forward) or k+1 (backward)
  input  bm_vec_t bm_in,      // branch metrics of step k
  output logic    out_valid,  // last stage holds a result
  output slot_t   out_slot,
  output sm_vec_t sm_out      // normalized metrics of step k+1 (fwd) or k (bwd)
);
  localparam int unsigned AW    = SMW + 2;                     // width of a = SM + BM
  localparam bit          REG34 = (NSLOT >= 5);                // register between stages 3 and 4
  localparam int unsigned NTAIL = (NSLOT >= 5) ? NSLOT - 4 : 1; // registers after the LUT adder
  localparam int unsigned NREG  = NSLOT - 1;                   // registers in the loop
  typedef logic signed [AW-1:0] acc_t;
  typedef acc_t acc_vec_t [NS];

  // tag pipeline
  logic  vq [NREG];
  slot_t sq [NREG];
  // stage 1 -> 2
  sm_vec_t  sma2, smb2;
  bm_vec_t  bma2, bmb2;
  // stage 2 -> 3
  acc_vec_t a3, b3;
  // stage 3 -> 4
  acc_vec_t mx4;
  logic [SMW:0] ad4 [NS];
  // stage 4 -> last
  acc_vec_t msq [NTAIL];

  // ---- stage 1: trellis MUX --------------------------------------------
  sm_vec_t sma1, smb1;
  bm_vec_t bma1, bmb1;
  always_comb begin
    for (int m = 0; m < NS; m++) begin
      // forward: predecessors {m[0], j} with input u = m[1]^m[0]^j and
      // parity m[1]^j; backward: successors for u = 0 and u = 1
      logic [1:0] ms;
      ms = 2'(m);
      if (!in_bwd) begin
        sma1[m] = sm_in[{ms[0], 1'b0}];
        smb1[m] = sm_in[{ms[0], 1'b1}];
        bma1[m] = bm_in[{ms[1] ^ ms[0], ms[1]}];
        bmb1[m] = bm_in[{~(ms[1] ^ ms[0]), ~ms[1]}];
      end else begin
        sma1[m] = sm_in[trel_next(ms, 1'b0)];
        smb1[m] = sm_in[trel_next(ms, 1'b1)];
        bma1[m] = bm_in[{1'b0, trel_par(ms, 1'b0)}];
        bmb1[m] = bm_in[{1'b1, trel_par(ms, 1'b1)}];
      end
    end
  end

  // ---- stage 3 / 4 / last combinational parts --------------------------------
  acc_vec_t mx3, mx4i;
  logic [SMW:0] ad3 [NS];
  logic [SMW:0] ad4i [NS];
  acc_vec_t ms4;
  sm_vec_t  nrm;
  always_comb begin
    for (int m = 0; m < NS; m++) begin
      acc_t d;
      d       = a3[m] - b3[m];                             // subtractor
      ad3[m]  = d[AW-1] ? (SMW+1)'(-d) : (SMW+1)'(d);      // ABS
      mx3[m]  = d[AW-1] ? b3[m] : a3[m];                   // selection MUX
      mx4i[m] = REG34 ? mx4[m] : mx3[m];
      ad4i[m] = REG34 ? ad4[m] : ad3[m];
      ms4[m]  = mx4i[m] + acc_t'(fc_lut(ad4i[m]));         // LUT + adder
      nrm[m]  = sm_t'(msq[NTAIL-1][m] - msq[NTAIL-1][0]);  // normalization
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) begin
        vq[i] <= 1'b0;
        sq[i] <= '0;
      end
    end else if (en) begin
      vq[0] <= in_valid;
      sq[0] <= in_slot;
      for (int i = 1; i < NREG; i++) begin
        vq[i] <= vq[i-1];
        sq[i] <= sq[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int m = 0; m < NS; m++) begin
        sma2[m] <= sma1[m]; smb2[m] <= smb1[m];
        bma2[m] <= bma1[m]; bmb2[m] <= bmb1[m];
        a3[m]   <= acc_t'(sma2[m]) + acc_t'(bma2[m]);   // adder a
        b3[m]   <= acc_t'(smb2[m]) + acc_t'(bmb2[m]);   // adder b
        mx4[m]  <= mx3[m];
        ad4[m]  <= ad3[m];
        msq[0][m] <= ms4[m];
        for (int i = 1; i < NTAIL; i++) msq[i][m] <= msq[i-1][m];
      end
    end
  end

  assign out_valid = vq[NREG-1];
  assign out_slot  = sq[NREG-1];
  assign sm_out    = nrm;

  initial assert (NSLOT >= 4 && NSLOT <= 8) else $error("sm_processor: NSLOT must be 4..8");
endmodule
