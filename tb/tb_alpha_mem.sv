// tb_alpha_mem: checks the single-port forward metric memory: contents after
// writes, read-before-write behaviour (rdata returns the old entry in the
// clock that overwrites it), and that rdata holds while en is low.
module tb_alpha_mem;
  import map_pkg::*;
  localparam int DEPTH = L_DEF;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  sm_vec_t wdata, rdata;
  sm_t shadow [DEPTH][NS];
  sm_t expect_r [NS];
  int checks = 0, failures = 0;
  bit have_read = 1'b0;

  alpha_mem dut (.*);
  always #5 clk = ~clk;

  task automatic cmp(string what);
    for (int m = 0; m < NS; m++) begin
      checks++;
      if (rdata[m] != expect_r[m]) begin
        failures++;
        $display("FAIL: %s state %0d: %h expected %h", what, m, rdata[m], expect_r[m]);
      end
    end
  endtask

  initial begin
    for (int m = 0; m < NS; m++) wdata[m] = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = AW'(a);
      for (int m = 0; m < NS; m++) begin
        wdata[m] = sm_t'($urandom);
        shadow[a][m] = wdata[m];
      end
    end
    // random read-modify-write traffic
    for (int n = 0; n < 400; n++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, DEPTH - 1);
      en = $urandom_range(0, 3) != 0;
      we = 1'($urandom_range(0, 1));
      addr = AW'(a);
      for (int m = 0; m < NS; m++) wdata[m] = sm_t'($urandom);
      if (en) begin
        have_read = 1'b1;
        for (int m = 0; m < NS; m++) expect_r[m] = shadow[a][m];
        if (we) for (int m = 0; m < NS; m++) shadow[a][m] = wdata[m];
      end
      @(posedge clk);
      #1;
      if (have_read) cmp(en ? "read" : "hold");
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
