// tb_map_ctrl: runs the decoding controller through frames of 1, 3 and 5
// blocks with random input stalls and checks, in every clock, all schedule
// outputs against an independent model of the timing diagram: which block
// and bit position each pipeline slot works on, memory addresses, the input
// handshake, the LLR tag, the length of the run (M+2*MU+1 time frames of
// L steps of NSLOT clocks, not counting stalls) and the done pulse.
module tb_map_ctrl;
  import map_pkg::*;
  localparam int LI = int'(L_DEF);
  localparam int NSL = int'(NSLOT_DEF);
  localparam int BMAW = $clog2(NBMEM_DEF * L_DEF);
  localparam int AMAW = $clog2(L_DEF);
  localparam int TW = NBW + $clog2(L_DEF);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NBW-1:0] num_blocks = '0;
  logic in_valid = 1'b0;
  logic in_ready, busy, done, en, stall, bm_use_in, bm_we;
  logic [BMAW-1:0] bm_waddr, bm_raddr;
  logic proc_valid, proc_bwd, first_step, fwd_start;
  slot_t proc_slot;
  logic am_en, am_we;
  logic [AMAW-1:0] am_addr;
  logic llr_valid;
  logic [TW-1:0] llr_tag;
  int checks = 0, failures = 0;

  map_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 15) $display("FAIL: %s = %0d, expected %0d", what, got, want);
    end
  endtask

  task automatic run(int nb, int stall_pct);
    int e, total, taken, nout, wait_done;
    @(negedge clk);
    num_blocks = NBW'(nb);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    e = 0; taken = 0; nout = 0;
    total = (nb + 2 * int'(MU_DEF) + 1) * NSL * LI;
    while (e < total) begin
      int ph, st, fr, blk, k;
      bit need;
      in_valid = (int'($urandom_range(0, 99)) >= stall_pct);
      #1;
      ph = e % NSL; st = (e / NSL) % LI; fr = e / (NSL * LI);
      blk = fr - ((ph == 0) ? 2 * int'(MU_DEF) : 2 * ph - 1);
      k = (ph == 0) ? st : LI - 1 - st;
      need = (ph == 0 && fr < nb);
      expect_eq("busy", int'(busy), int'(1));
      expect_eq("in_ready", int'(in_ready), int'(need));
      expect_eq("en", int'(en), int'(!(need && !in_valid)));
      expect_eq("bm_we", int'(bm_we), int'(ph == 0));
      expect_eq("bm_use_in", int'(bm_use_in), int'(need));
      if (ph == 0) expect_eq("bm_waddr", int'(bm_waddr), int'((fr % int'(NBMEM_DEF)) * LI + st));
      expect_eq("proc_slot", int'(proc_slot), int'(ph));
      expect_eq("proc_bwd", int'(proc_bwd), int'(ph != 0));
      expect_eq("first_step", int'(first_step), int'(st == 0));
      expect_eq("proc_valid", int'(proc_valid), int'(blk >= 0));
      expect_eq("fwd_start", int'(fwd_start), int'(ph == 0 && st == 0 && blk == 0));
      if (blk >= 0) expect_eq("bm_raddr", int'(bm_raddr), int'((blk % int'(NBMEM_DEF)) * LI + k));
      expect_eq("am_en", int'(am_en), int'(ph == 0 && en));
      if (ph == 0 && blk >= 0 && blk < nb) begin
        expect_eq("am_we", int'(am_we), int'(1));
        expect_eq("am_addr", int'(am_addr), int'((blk % 2 == 1) ? LI - 1 - st : st));
      end
      if (ph == 0 && blk >= nb) expect_eq("am_we", int'(am_we), int'(0));
      expect_eq("llr_valid", int'(llr_valid), int'(ph == NSL - 1 && blk >= 0 && blk < nb));
      if (llr_valid) begin
        nout++;
        expect_eq("llr_tag", int'(llr_tag), int'(blk * LI + k));
      end
      if (en) e++;
      if (in_ready && in_valid) taken++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    expect_eq("symbols taken", int'(taken), int'(nb * LI));
    expect_eq("LLR steps", int'(nout), int'(nb * LI));
    wait_done = 0;
    while (!done && wait_done < 20) begin
      expect_eq("in_ready after run", int'(in_ready), int'(0));
      wait_done++;
      @(negedge clk);
    end
    expect_eq("drain clocks", int'(wait_done), int'(4));
    @(negedge clk);
    expect_eq("busy after done", int'(busy), int'(0));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(1, 0);
    run(3, 30);
    run(5, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
