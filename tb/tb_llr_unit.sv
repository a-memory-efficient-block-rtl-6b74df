// tb_llr_unit: drives the LLR / extrinsic unit with random alpha, beta and
// branch metrics (random enable gaps) and checks LLR, extrinsic value, hard
// decision and tag three enabled clocks later against a reference: max* with
// correction round(4*ln(1+exp(-d/4))) over the state pairs (0,1) and (2,3),
// then over the two pair results.
module tb_llr_unit;
  import map_pkg::*;
  localparam int TW = NBW + $clog2(L_DEF);
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0;
  logic [TW-1:0] in_tag = '0;
  sm_vec_t alpha, beta;
  bm_vec_t bm;
  logic out_valid, out_hard;
  logic [TW-1:0] out_tag;
  llr_t out_llr, out_ext;
  int checks = 0, failures = 0;

  llr_unit dut (.*);
  always #5 clk = ~clk;

  typedef struct { bit v; int tag; int llr; int ext; } exp_t;
  exp_t pipe [3];

  function automatic int fcr(int d);
    return int'(4.0 * $ln(1.0 + $exp(-d / 4.0)));
  endfunction
  function automatic int mxs(int a, int b);
    return ((a > b) ? a : b) + fcr((a > b) ? a - b : b - a);
  endfunction
  function automatic int nxt(int m, int u);
    int a; a = u ^ (m >> 1) ^ (m & 1); return (a << 1) | (m >> 1);
  endfunction
  function automatic int par(int m, int u);
    int a; a = u ^ (m >> 1) ^ (m & 1); return a ^ (m & 1);
  endfunction

  initial begin
    int a [NS], b [NS], g [4];
    for (int i = 0; i < 3; i++) pipe[i].v = 1'b0;
    for (int m = 0; m < NS; m++) begin alpha[m] = '0; beta[m] = '0; end
    for (int i = 0; i < 4; i++) bm[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (pipe[0].v) begin
        checks++;
        if (!out_valid || int'(out_tag) != pipe[0].tag || int'(out_llr) != pipe[0].llr ||
            int'(out_ext) != pipe[0].ext || out_hard != (pipe[0].llr > 0)) begin
          failures++;
          if (failures < 10) $display("FAIL: tag %0d/%0d llr %0d/%0d ext %0d/%0d hard %0d",
              out_tag, pipe[0].tag, out_llr, pipe[0].llr, out_ext, pipe[0].ext, out_hard);
        end
      end else if (out_valid) begin
        checks++; failures++;
        $display("FAIL: unexpected output");
      end
      en = $urandom_range(0, 4) != 0;
      in_valid = $urandom_range(0, 4) != 0;
      in_tag = TW'($urandom);
      for (int m = 0; m < NS; m++) begin
        a[m] = int'($urandom_range(0, 60)) - 30;
        b[m] = ($urandom_range(0, 1) != 0) ? int'($urandom_range(0, 60)) - 30
                                           : int'($urandom_range(0, 8000)) - 4000;
        alpha[m] = sm_t'(a[m]); beta[m] = sm_t'(b[m]);
      end
      g[0] = 0;
      g[1] = int'($urandom_range(0, 200)) - 100;
      g[2] = int'($urandom_range(0, 1200)) - 600;
      g[3] = g[1] + g[2];
      for (int i = 0; i < 4; i++) bm[i] = bm_t'(g[i]);
      @(posedge clk);
      if (en) begin
        int s0 [NS], s1 [NS], l1, l0;
        for (int m = 0; m < NS; m++) begin
          s0[m] = a[m] + g[par(m, 0)] + b[nxt(m, 0)];
          s1[m] = a[m] + g[2 + par(m, 1)] + b[nxt(m, 1)];
        end
        l1 = mxs(mxs(s1[0], s1[1]), mxs(s1[2], s1[3]));
        l0 = mxs(mxs(s0[0], s0[1]), mxs(s0[2], s0[3]));
        pipe[0] = pipe[1];
        pipe[1] = pipe[2];
        pipe[2].v = in_valid; pipe[2].tag = int'(in_tag);
        pipe[2].llr = l1 - l0; pipe[2].ext = l1 - l0 - g[2];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
