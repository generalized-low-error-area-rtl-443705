// tb_fw_error_tables -- accuracy of the proposed multipliers against the
// published comparison tables (relative maximum error, relative mean error
// and relative variance of the error, each against direct truncation).
// Widths 6, 10 and 12 are run over every operand pair and must match the
// printed percentages to their rounding; width 16 is sampled with random
// operands, so only the mean and variance are checked, with a looser
// tolerance. (Width 8 is covered by tb_fw_top.)
module tb_fw_error_tables;
  logic done [4];
  int   chk [4], fail [4];

  fw_err_stats #(.N(6), .EXP('{15.26, 14.51, 4.96, 11.53, 14.08, 4.28, 27.73, 21.44, 14.43}))
    u_n6 (.done(done[0]), .checks(chk[0]), .failures(fail[0]));
  fw_err_stats #(.N(10), .EXP('{12.12, 10.38, 3.35, 8.36, 9.34, 2.18, 22.84, 16.20, 9.56}))
    u_n10 (.done(done[1]), .checks(chk[1]), .failures(fail[1]));
  fw_err_stats #(.N(12), .EXP('{11.43, 9.23, 3.09, 7.61, 8.02, 1.85, 21.72, 14.60, 8.66}))
    u_n12 (.done(done[2]), .checks(chk[2]), .failures(fail[2]));
  fw_err_stats #(.N(16), .EXHAUSTIVE(1'b0), .SAMPLES(1000000), .TOL(0.25),
                 .EXP('{10.60, 7.66, 2.71, 6.69, 6.30, 1.47, 20.37, 12.41, 7.65}))
    u_n16 (.done(done[3]), .checks(chk[3]), .failures(fail[3]));

  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end

  initial begin
    #1;  // let every bench clear its done flag first
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3]);
    $finish;
  end
endmodule
