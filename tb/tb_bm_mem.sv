// tb_bm_mem: fills the branch metric memory with random entries, reads every
// address back, then overwrites random entries while reading others and
// checks against a shadow copy.
module tb_bm_mem;
  import map_pkg::*;
  localparam int DEPTH = NBMEM_DEF * L_DEF;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  bm_vec_t wdata, rdata;
  bm_t shadow [DEPTH][4];
  int checks = 0, failures = 0;

  bm_mem dut (.*);
  always #5 clk = ~clk;

  task automatic rnd_word();
    for (int i = 0; i < 4; i++) wdata[i] = bm_t'($urandom);
  endtask

  task automatic check_addr(int a);
    raddr = AW'(a);
    #1;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (rdata[i] != shadow[a][i]) begin
        failures++;
        $display("FAIL: addr %0d word %0d = %h expected %h", a, i, rdata[i], shadow[a][i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) wdata[i] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rnd_word();
      we = 1'b1; waddr = AW'(a);
      for (int i = 0; i < 4; i++) shadow[a][i] = wdata[i];
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) check_addr(a);
    for (int n = 0; n < 300; n++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, DEPTH - 1);
      rnd_word();
      we = 1'($urandom_range(0, 1));
      waddr = AW'(a);
      if (we) for (int i = 0; i < 4; i++) shadow[a][i] = wdata[i];
      @(posedge clk);
      #1;
      check_addr($urandom_range(0, DEPTH - 1));
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
