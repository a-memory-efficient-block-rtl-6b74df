// tb_map_decoder_mu: runs the decoder in the other two configurations of the
// memory comparison, MU = 2 (block size 12, four-slot pipeline) and MU = 4
// (block size 6, six-slot pipeline), both with training size 24, through
// map_mu_tester, side by side.
module tb_map_decoder_mu;
  logic fin2, fin4;
  int   c2, f2, c4, f4;
  int   checks, failures;

  map_mu_tester #(.MU_T(2), .TRAIN_T(24)) u_mu2 (.finished(fin2), .checks(c2), .failures(f2));
  map_mu_tester #(.MU_T(4), .TRAIN_T(24)) u_mu4 (.finished(fin4), .checks(c4), .failures(f4));

  initial begin
    #1;   // let both testers clear their finished flags first
    wait (fin2 && fin4);
    checks = c2 + c4;
    failures = f2 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4, f2 + f4 + 1);
    $finish;
  end
endmodule
