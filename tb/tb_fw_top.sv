// tb_fw_top -- end-to-end testbench of fw_top at its default size (N = 8).
//
// Applies all 65536 operand pairs to each of the three multipliers and
// 1) compares every product with the reference of fw_ref_pkg (high bits of
//    the exact product plus the bias from its formula);
// 2) counts how often each compensation case occurs -- Type 1: theta = 0
//    (extra unit added) and theta > 0; Type 2: theta_Q = N (no unit added)
//    and theta_Q < N -- and fails a case that never occurred;
// 3) measures the error e = x*y - 2^N * p of each multiplier and of a
//    directly truncated product, and checks the maximum, mean |e| and
//    variance of |e|, relative to direct truncation, against the published
//    8-bit figures (13.22/12.00/3.80 % for Type 1 w=1, 9.54/11.22/2.79 % for
//    Type 1 w=2, 24.60/18.39/11.11 % for Type 2), to the printed rounding.
// Combinational DUT: outputs are sampled 1 ns after each input change.
module tb_fw_top;
  import fw_ref_pkg::*;

  localparam int N = 8;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] x, y, p1, p2, pt;

  fw_top dut (.t1w1_x(x), .t1w1_y(y), .t1w1_p(p1),
              .t1w2_x(x), .t1w2_y(y), .t1w2_p(p2),
              .t2_x(x),   .t2_y(y),   .t2_p(pt));

  // error accumulators: 0 = direct truncation, 1 = t1w1, 2 = t1w2, 3 = t2
  longint emax [4];
  real    esum [4], esq [4];
  // compensation cases seen: 0/1 t1w1 theta=0/>0, 2/3 t1w2 theta=0/>0,
  // 4/5 t2 theta_Q=N/<N
  int     seen [6];

  function automatic void note(int k);
    seen[k] += 1;
  endfunction

  task automatic check(string tag, longint unsigned got, longint unsigned exp,
                       longint unsigned a, longint unsigned b);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s x=%0h y=%0h got=%0h exp=%0h", tag, a, b, got, exp);
    end
  endtask

  task automatic expect_pct(string tag, real got, real exp, real tol);
    checks++;
    $display("  %-14s %8.2f %%  (published %6.2f %%)", tag, got, exp);
    if (!(got >= exp - tol && got <= exp + tol)) begin
      failures++;
      $display("FAIL %s", tag);
    end
  endtask

  task automatic expect_seen(string tag, int count);
    checks++;
    $display("  case %-22s occurred %0d times", tag, count);
    if (count == 0) begin
      failures++;
      $display("FAIL case %s never occurred", tag);
    end
  endtask

  function automatic void acc(int k, longint e);
    longint a = (e < 0) ? -e : e;
    if (a > emax[k]) emax[k] = a;
    esum[k] += real'(a);
    esq[k]  += real'(a) * real'(a);
  endfunction

  function automatic real var_abs(int k, real cnt);
    real m = esum[k] / cnt;
    return esq[k] / cnt - m * m;
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real cnt;
    longint prod;
    int th;
    for (int k = 0; k < 4; k++) begin emax[k] = 0; esum[k] = 0; esq[k] = 0; end
    for (int k = 0; k < 6; k++) seen[k] = 0;
    for (int a = 0; a < (1 << N); a++)
      for (int b = 0; b < (1 << N); b++) begin
        x = N'(a); y = N'(b);
        #1;
        check("t1w1", p1, fixed_width(a, b, N, sigma_type1(a, b, N, 1)), a, b);
        check("t1w2", p2, fixed_width(a, b, N, sigma_type1(a, b, N, 2)), a, b);
        check("t2",   pt, fixed_width(a, b, N, sigma_type2(a, b, N, (1 << (N - 1)) + 1)), a, b);
        th = col_sum(a, b, N, N - 2);
        note((th == 0) ? 0 : 1);
        th = col_sum(a, b, N, N - 3);
        note((th == 0) ? 2 : 3);
        th = col_sum(a, b, N, N - 1);  // theta_Q for Q = 2^(N-1)+1 is column N-1
        note((th == N) ? 4 : 5);
        prod = sval(a, N) * sval(b, N);
        acc(0, low_part(a, b, N));
        acc(1, prod - (sval(p1, N) <<< N));
        acc(2, prod - (sval(p2, N) <<< N));
        acc(3, prod - (sval(pt, N) <<< N));
      end
    cnt = real'(1 << (2 * N));
    $display("direct truncation: max %0d, mean %f, var %f", emax[0], esum[0] / cnt, var_abs(0, cnt));
    // published direct-truncation reference values for n = 8: 1793, 576.25
    checks++;
    if (emax[0] != 1793 || esum[0] / cnt != 576.25) begin
      failures++; $display("FAIL direct truncation reference");
    end
    expect_pct("t1w1 max",  100.0 * real'(emax[1]) / real'(emax[0]), 13.22, 0.006);
    expect_pct("t1w1 mean", 100.0 * esum[1] / esum[0],               12.00, 0.006);
    expect_pct("t1w1 var",  100.0 * var_abs(1, cnt) / var_abs(0, cnt), 3.80, 0.006);
    expect_pct("t1w2 max",  100.0 * real'(emax[2]) / real'(emax[0]),  9.54, 0.006);
    expect_pct("t1w2 mean", 100.0 * esum[2] / esum[0],               11.22, 0.006);
    expect_pct("t1w2 var",  100.0 * var_abs(2, cnt) / var_abs(0, cnt), 2.79, 0.006);
    expect_pct("t2 max",    100.0 * real'(emax[3]) / real'(emax[0]), 24.60, 0.006);
    expect_pct("t2 mean",   100.0 * esum[3] / esum[0],               18.39, 0.006);
    expect_pct("t2 var",    100.0 * var_abs(3, cnt) / var_abs(0, cnt), 11.11, 0.006);
    expect_seen("t1w1 theta=0", seen[0]);
    expect_seen("t1w1 theta>0", seen[1]);
    expect_seen("t1w2 theta=0", seen[2]);
    expect_seen("t1w2 theta>0", seen[3]);
    expect_seen("t2 theta_Q=N", seen[4]);
    expect_seen("t2 theta_Q<N", seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
