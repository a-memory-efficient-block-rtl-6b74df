// tb_bmu: checks the branch metric unit against u*(x+La) + v*y for random
// and extreme inputs.
module tb_bmu;
  import map_pkg::*;
  logic signed [XW-1:0]  x, y;
  logic signed [LAW-1:0] la;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  bmu dut (.*);

  task automatic try(int xi, int yi, int li);
    x = XW'(xi); y = XW'(yi); la = LAW'(li);
    #1;
    for (int u = 0; u < 2; u++)
      for (int v = 0; v < 2; v++) begin
        int e;
        e = u * (xi + li) + v * yi;
        checks++;
        if (int'(bm[u*2+v]) != e) begin
          failures++;
          $display("FAIL: x=%0d y=%0d la=%0d bm[%0d%0d]=%0d expected %0d", xi, yi, li, u, v, bm[u*2+v], e);
        end
      end
  endtask

  initial begin
    try(127, 127, 511);
    try(-128, -128, -512);
    try(0, 0, 0);
    for (int i = 0; i < 500; i++)
      try(int'($urandom_range(0, 255)) - 128, int'($urandom_range(0, 255)) - 128,
          int'($urandom_range(0, 1023)) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
