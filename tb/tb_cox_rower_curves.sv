// tb_cox_rower_curves: runs the Cox-Rower array at the curve sizes of the
// evaluated configurations below 521 bits (the 521-bit size is the default
// and has its own testbench): p of 160, 192, 224, 256 and 384 bits with
// n = 10, 12, 14, 16 and 23 Rowers and the listed mu_max of 2^7, 2^7, 2^8,
// 2^8 and 2^9. Each size is an independent array; see cr_curve_run.
module tb_cox_rower_curves;
  localparam int K = 5;
  logic fin [K];
  int   chk [K], fail [K];

  cr_curve_run #(.CURVE(160), .N(10), .Q_TABLE(5), .MU_LOG2(7)) u160 (.finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  cr_curve_run #(.CURVE(192), .N(12), .Q_TABLE(5), .MU_LOG2(7)) u192 (.finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  cr_curve_run #(.CURVE(224), .N(14), .Q_TABLE(5), .MU_LOG2(8)) u224 (.finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  cr_curve_run #(.CURVE(256), .N(16), .Q_TABLE(5), .MU_LOG2(8)) u256 (.finished(fin[3]), .checks(chk[3]), .failures(fail[3]));
  cr_curve_run #(.CURVE(384), .N(23), .Q_TABLE(6), .MU_LOG2(9)) u384 (.finished(fin[4]), .checks(chk[4]), .failures(fail[4]));

  int checks, failures;
  initial begin
    #20;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < K; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
