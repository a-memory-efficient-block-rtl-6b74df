// tb_init_state_ctrl: writes random metrics into random slots (with enable
// and valid gaps) and checks the starting-metric selection for every slot,
// first-step and forward-start combination against a shadow register file.
module tb_init_state_ctrl;
  import map_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic wr_valid = 1'b0;
  slot_t wr_slot = '0, rd_slot = '0;
  sm_vec_t wr_data, sm_sel;
  logic first_step = 1'b0, fwd_start = 1'b0;
  int shadow [NSLOT_DEF][NS];
  int checks = 0, failures = 0;

  init_state_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check_sel();
    for (int p = 0; p < NSLOT_DEF; p++)
      for (int f = 0; f < 4; f++) begin
        int e [NS];
        rd_slot = slot_t'(p);
        first_step = f[0];
        fwd_start = f[1] & f[0];
        #1;
        for (int m = 0; m < NS; m++) begin
          if (p == 0)           e[m] = fwd_start ? ((m == 0) ? 0 : -4096) : shadow[0][m];
          else if (!first_step) e[m] = shadow[p][m];
          else if (p == 1)      e[m] = 0;
          else                  e[m] = shadow[p - 1][m];
          checks++;
          if (int'(sm_sel[m]) != e[m]) begin
            failures++;
            if (failures < 10) $display("FAIL: slot %0d first %0d start %0d state %0d: %0d expected %0d",
                                        p, first_step, fwd_start, m, sm_sel[m], e[m]);
          end
        end
      end
  endtask

  initial begin
    for (int m = 0; m < NS; m++) wr_data[m] = '0;
    for (int p = 0; p < NSLOT_DEF; p++) for (int m = 0; m < NS; m++) shadow[p][m] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_sel();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0;
      wr_valid = $urandom_range(0, 3) != 0;
      wr_slot = slot_t'($urandom_range(0, NSLOT_DEF - 1));
      for (int m = 0; m < NS; m++) wr_data[m] = sm_t'(int'($urandom_range(0, 20000)) - 10000);
      @(posedge clk);
      if (en && wr_valid) for (int m = 0; m < NS; m++) shadow[wr_slot][m] = int'(wr_data[m]);
      @(negedge clk);
      en = 1'b0;
      check_sel();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
