// tb_map_decoder_top: end-to-end test of the block-wise MAP decoder at its
// default size (MU = 3, L = 8, four states).
//
// Random information bits are encoded by a behavioural model of the
// rate-1/2 recursive systematic encoder (feedback 7, parity 5, start state 0),
// mapped to +/-A, disturbed by approximately Gaussian noise and fed to the
// decoder. A reference model computes the block-wise log-MAP result the
// decoder should produce: forward metrics over the whole frame, backward
// metrics of block j started from equal metrics at the end of block j+MU,
// zero branch metrics past the frame end, and the max* correction
// round(4*ln(1+exp(-d/4))) computed with real arithmetic. Every LLR,
// extrinsic value and hard decision is compared exactly, every bit index must
// appear once, and in a stall-free frame the clock of every output is
// checked against the schedule (block b leaves in time frame b+2*MU+1, one
// bit per NSLOT clocks). Frames: a short stall-free one, a single-block one,
// one with random input stalls and a-priori values, and a 640-block frame
// (5120 bits, the largest UMTS turbo code frame of 5114 bits rounded up to
// whole blocks). The mechanisms of the design (stall, training hand-over,
// forward continuation across blocks, padding past the frame end, reversed
// addressing of the forward metric memory, non-zero max* correction) are
// counted and each must occur.
module tb_map_decoder_top;
  import map_pkg::*;

  localparam int MAXN = 5120;
  localparam int TW   = NBW + $clog2(L_DEF);
  localparam int LI   = int'(L_DEF);    // signed copies for index arithmetic
  localparam int MUI  = int'(MU_DEF);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [NBW-1:0] num_blocks = '0;
  logic busy, done;
  logic in_valid = 1'b0, in_ready;
  logic signed [XW-1:0]  in_x = '0, in_y = '0;
  logic signed [LAW-1:0] in_la = '0;
  logic out_valid;
  logic [TW-1:0] out_idx;
  llr_t out_llr, out_ext;
  logic out_hard;

  map_decoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int t0 = 0;      // value of cyc in the first clock after start was taken

  // frame data
  int nbits;
  int xv [MAXN], yv [MAXN], lav [MAXN], dbit [MAXN];
  int exp_llr [MAXN], exp_ext [MAXN];
  int alpha [MAXN+1][4];
  bit seen [MAXN];
  int n_out;
  bit check_timing;
  int hard_err;

  // mechanism counters
  int n_stall = 0, n_handover = 0, n_fwd_cont = 0, n_pad = 0, n_rev_addr = 0, n_corr = 0;

  function automatic int fcr(int d);
    real r;
    r = 4.0 * $ln(1.0 + $exp(-d / 4.0));
    return int'(r);          // rounds to nearest
  endfunction

  function automatic int mxs(int a, int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + fcr(d);
  endfunction

  function automatic int nxt(int m, int u);
    int a;
    a = u ^ (m >> 1) ^ (m & 1);
    return (a << 1) | (m >> 1);
  endfunction

  function automatic int par(int m, int u);
    int a;
    a = u ^ (m >> 1) ^ (m & 1);
    return a ^ (m & 1);
  endfunction

  function automatic int bmr(int k, int u, int v);
    if (k >= nbits) return 0;
    return u * (xv[k] + lav[k]) + v * yv[k];
  endfunction

  function automatic int clip(int v, int w);
    int hi;
    hi = (1 << (w - 1)) - 1;
    if (v > hi) return hi;
    if (v < -hi - 1) return -hi - 1;
    return v;
  endfunction

  function automatic int noise(int amp);
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 2 * amp)) - amp;
    return s / 2;
  endfunction

  // Build a frame of nb blocks and its expected decoder output.
  task automatic make_frame(int nb, int amp, int namp, bit use_la);
    int st;
    int beta [4], nb4 [4];
    nbits = nb * LI;
    st = 0;
    for (int k = 0; k < nbits; k++) begin
      int u, v;
      u = $urandom_range(0, 1);
      v = par(st, u);
      st = nxt(st, u);
      dbit[k] = u;
      xv[k]  = clip(((u != 0) ? amp : -amp) + noise(namp), XW);
      yv[k]  = clip(((v != 0) ? amp : -amp) + noise(namp), XW);
      lav[k] = use_la ? int'($urandom_range(0, 40)) - 20 : 0;
      seen[k] = 1'b0;
    end
    // forward
    alpha[0][0] = 0;
    for (int m = 1; m < 4; m++) alpha[0][m] = -4096;
    for (int k = 0; k < nbits; k++) begin
      bit first [4];
      for (int m = 0; m < 4; m++) first[m] = 1'b1;
      for (int m = 0; m < 4; m++)
        for (int u = 0; u < 2; u++) begin
          int t, n;
          n = nxt(m, u);
          t = alpha[k][m] + bmr(k, u, par(m, u));
          alpha[k+1][n] = first[n] ? t : mxs(alpha[k+1][n], t);
          first[n] = 1'b0;
        end
    end
    // backward per block, trained over the MU following blocks
    for (int j = 0; j < nb; j++) begin
      for (int m = 0; m < 4; m++) beta[m] = 0;
      for (int k = (j + MUI + 1) * LI - 1; k >= j * LI; k--) begin
        if (k < (j + 1) * LI) begin
          int s0 [4], s1 [4], l1, l0;
          for (int m = 0; m < 4; m++) begin
            s0[m] = alpha[k][m] + bmr(k, 0, par(m, 0)) + beta[nxt(m, 0)];
            s1[m] = alpha[k][m] + bmr(k, 1, par(m, 1)) + beta[nxt(m, 1)];
          end
          l1 = mxs(mxs(s1[0], s1[1]), mxs(s1[2], s1[3]));
          l0 = mxs(mxs(s0[0], s0[1]), mxs(s0[2], s0[3]));
          exp_llr[k] = l1 - l0;
          exp_ext[k] = l1 - l0 - (xv[k] + lav[k]);
        end
        for (int m = 0; m < 4; m++)
          nb4[m] = mxs(beta[nxt(m, 0)] + bmr(k, 0, par(m, 0)),
                       beta[nxt(m, 1)] + bmr(k, 1, par(m, 1)));
        beta = nb4;
      end
    end
  endtask

  // Decode the current frame; stall_pct = chance (in %) of a missing symbol.
  task automatic run_frame(int nb, int stall_pct, bit timing);
    int k;
    n_out = 0;
    hard_err = 0;
    check_timing = timing;
    @(posedge clk);
    num_blocks <= NBW'(nb);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(negedge clk);
    t0 = cyc;
    k = 0;
    while (!done) begin
      if (k < nbits && int'($urandom_range(0, 99)) >= stall_pct) begin
        in_valid <= 1'b1;
        in_x  <= XW'(xv[k]);
        in_y  <= XW'(yv[k]);
        in_la <= LAW'(lav[k]);
      end else begin
        in_valid <= 1'b0;
      end
      @(posedge clk);
      if (in_valid && in_ready) k++;
    end
    in_valid <= 1'b0;
    checks++;
    if (n_out != nbits) begin
      failures++;
      $display("FAIL: %0d outputs for %0d bits", n_out, nbits);
    end
    for (int i = 0; i < nbits; i++) if (!seen[i]) begin
      failures++;
      $display("FAIL: bit %0d never output", i);
      break;
    end
    $display("frame of %0d blocks: %0d outputs, %0d hard-decision errors vs sent bits",
             nb, n_out, hard_err);
  endtask

  // free-running clock counter
  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int i, b, s, ecyc;
      i = int'(out_idx);
      checks++;
      if (i >= nbits || seen[i]) begin
        failures++;
        $display("FAIL: unexpected output index %0d", i);
      end else begin
        seen[i] = 1'b1;
        n_out++;
        if (int'(out_llr) != exp_llr[i] || int'(out_ext) != exp_ext[i] ||
            out_hard != (exp_llr[i] > 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: bit %0d llr %0d/%0d ext %0d/%0d hard %0d", i,
                     out_llr, exp_llr[i], out_ext, exp_ext[i], out_hard);
        end
        if (out_hard != dbit[i][0]) hard_err++;
        if (check_timing) begin
          b = i / LI;
          s = LI - 1 - (i % LI);
          ecyc = (b + 2 * MUI + 1) * int'(NSLOT_DEF) * LI + s * int'(NSLOT_DEF) + int'(NSLOT_DEF) - 1 + 3;
          checks++;
          if (cyc - t0 != ecyc) begin
            failures++;
            $display("FAIL: bit %0d out at clock %0d, expected %0d", i, cyc - t0, ecyc);
          end
        end
      end
    end
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.stall) n_stall++;
    if (dut.en) begin
      if (dut.proc_valid && dut.first_step && dut.proc_slot > 1) n_handover++;
      if (dut.proc_valid && dut.first_step && dut.proc_slot == 0 && !dut.fwd_start) n_fwd_cont++;
      if (dut.bm_we && !dut.bm_use_in) n_pad++;
      if (dut.am_en && dut.am_we && dut.am_addr != dut.u_ctrl.step) n_rev_addr++;
      if (dut.u_smp.vq[NSLOT_DEF-2] && dut.u_smp.msq[0][0] != dut.u_smp.mx4[0]) n_corr++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    make_frame(3, 24, 0, 1'b0);
    run_frame(3, 0, 1'b1);
    checks++;
    if (hard_err != 0) begin
      failures++;
      $display("FAIL: noiseless frame decoded with %0d errors", hard_err);
    end
    make_frame(1, 24, 12, 1'b0);
    run_frame(1, 0, 1'b1);
    make_frame(6, 16, 24, 1'b1);
    run_frame(6, 30, 1'b0);
    make_frame(640, 16, 20, 1'b0);
    run_frame(640, 5, 1'b0);
    need("input stalls", n_stall);
    need("training hand-overs", n_handover);
    need("forward continuation across blocks", n_fwd_cont);
    need("padding steps past frame end", n_pad);
    need("reversed forward-memory writes", n_rev_addr);
    need("max* corrections applied", n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
