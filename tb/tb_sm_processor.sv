// tb_sm_processor: drives the pipelined state metric processor with a random
// step in every clock (random slot, direction, metrics) and random enable
// gaps, and checks every result four enabled clocks later against a
// reference ACS step: max* over the two trellis branches of each state with
// the correction round(4*ln(1+exp(-d/4))), normalized to state 0.
module tb_sm_processor;
  import map_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic in_valid = 1'b0, in_bwd = 1'b0;
  slot_t in_slot = '0;
  sm_vec_t sm_in;
  bm_vec_t bm_in;
  logic out_valid;
  slot_t out_slot;
  sm_vec_t sm_out;
  int checks = 0, failures = 0;

  sm_processor dut (.*);
  always #5 clk = ~clk;

  // expected results in flight: index 0 is the one at stage 5
  typedef struct { bit v; int slot; int sm [NS]; } exp_t;
  exp_t pipe [4];

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

  function automatic exp_t ref_step(bit v, int slot, bit bwd, int s [NS], int b [4]);
    exp_t e;
    int r [NS];
    bit got [NS];
    e.v = v; e.slot = slot;
    for (int n = 0; n < NS; n++) got[n] = 1'b0;
    for (int m = 0; m < NS; m++)
      for (int u = 0; u < 2; u++) begin
        int br;
        br = b[u * 2 + par(m, u)];
        if (!bwd) begin
          int n, t;
          n = nxt(m, u);
          t = s[m] + br;
          r[n] = got[n] ? mxs(r[n], t) : t;
          got[n] = 1'b1;
        end else begin
          int t;
          t = s[nxt(m, u)] + br;
          r[m] = (u == 0) ? t : mxs(r[m], t);
        end
      end
    for (int n = 0; n < NS; n++) e.sm[n] = r[n] - r[0];
    return e;
  endfunction

  initial begin
    int s [NS], b [4];
    for (int i = 0; i < 4; i++) pipe[i].v = 1'b0;
    for (int m = 0; m < NS; m++) sm_in[m] = '0;
    for (int i = 0; i < 4; i++) bm_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check stage 5 output
      if (pipe[0].v) begin
        checks++;
        if (!out_valid || int'(out_slot) != pipe[0].slot) begin
          failures++;
          $display("FAIL: missing result or wrong slot (%0d/%0d)", out_slot, pipe[0].slot);
        end
        for (int m = 0; m < NS; m++) begin
          checks++;
          if (int'(sm_out[m]) != pipe[0].sm[m]) begin
            failures++;
            if (failures < 10) $display("FAIL: slot %0d state %0d: %0d expected %0d",
                                        pipe[0].slot, m, sm_out[m], pipe[0].sm[m]);
          end
        end
      end else if (out_valid) begin
        checks++; failures++;
        $display("FAIL: unexpected result");
      end
      // new input
      en = ($urandom_range(0, 4) != 0);
      in_valid = ($urandom_range(0, 5) != 0);
      in_slot  = slot_t'($urandom_range(0, NSLOT_DEF - 1));
      in_bwd   = 1'($urandom_range(0, 1));
      for (int m = 0; m < NS; m++) begin
        // mostly close metrics so that the correction term is exercised
        s[m] = ($urandom_range(0, 1) != 0) ? int'($urandom_range(0, 40)) - 20
                                           : int'($urandom_range(0, 12000)) - 6000;
        sm_in[m] = sm_t'(s[m]);
      end
      for (int i = 0; i < 4; i++) begin
        b[i] = ($urandom_range(0, 1) != 0) ? int'($urandom_range(0, 20)) - 10
                                           : int'($urandom_range(0, 1600)) - 800;
        bm_in[i] = bm_t'(b[i]);
      end
      @(posedge clk);
      if (en) begin
        for (int i = 0; i < 3; i++) pipe[i] = pipe[i + 1];
        pipe[3] = ref_step(in_valid, int'(in_slot), in_bwd, s, b);
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
