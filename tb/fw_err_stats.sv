// fw_err_stats -- error-statistics bench for one operand width N.
//
// Drives the three proposed multipliers (Type 1 w=1, Type 1 w=2, Type 2
// Q=2^(N-1)+1) with every operand pair (EXHAUSTIVE = 1) or with SAMPLES
// random pairs, measures the error e = x*y - 2^N * p, and reports the
// maximum |e|, mean |e| and variance of |e| of each as a percentage of the
// same figure for direct truncation (dropping the N low columns, error =
// their value). Each percentage is compared with the expected value in
// EXP (order: t1w1 max, mean, var, t1w2 max, mean, var, t2 max, mean, var)
// within TOL percentage points; the maximum is only checked when
// exhaustive. Raises done when finished; checks/failures count the
// comparisons.
module fw_err_stats #(
  parameter int  N = 8,
  parameter bit  EXHAUSTIVE = 1'b1,
  parameter int  SAMPLES = 0,
  parameter real TOL = 0.011,
  parameter real EXP [9] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0}
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import fw_ref_pkg::*;

  logic [N-1:0] x, y, p [3];

  fw_mult_type1 #(.N(N), .W(1)) u_t1w1 (.x(x), .y(y), .p(p[0]));
  fw_mult_type1 #(.N(N), .W(2)) u_t1w2 (.x(x), .y(y), .p(p[1]));
  fw_mult_type2 #(.N(N))        u_t2   (.x(x), .y(y), .p(p[2]));

  localparam string NAMES [3] = '{"t1w1", "t1w2", "t2"};

  // index 0: direct truncation, 1..3: the multipliers
  longint emax [4];
  real    esum [4], esq [4];

  function automatic void acc(int k, longint e);
    longint a = (e < 0) ? -e : e;
    if (a > emax[k]) emax[k] = a;
    esum[k] += real'(a);
    esq[k]  += real'(a) * real'(a);
  endfunction

  function automatic void expect_pct(string tag, real got, real exp);
    checks += 1;
    $display("  n=%0d %-10s %8.2f %%  (expected %6.2f %%)", N, tag, got, exp);
    if (!(got >= exp - TOL && got <= exp + TOL)) begin
      failures += 1;
      $display("FAIL n=%0d %s", N, tag);
    end
  endfunction

  initial begin
    longint unsigned total, a, b;
    longint prod;
    real cnt, m0, v0, m, v;
    done = 1'b0; checks = 0; failures = 0;
    for (int k = 0; k < 4; k++) begin emax[k] = 0; esum[k] = 0; esq[k] = 0; end
    total = EXHAUSTIVE ? (64'd1 << (2 * N)) : longint'(SAMPLES);
    for (longint unsigned i = 0; i < total; i++) begin
      if (EXHAUSTIVE) begin
        a = i >> N; b = i & ((64'd1 << N) - 1);
      end else begin
        a = longint'($urandom) & ((64'd1 << N) - 1);
        b = longint'($urandom) & ((64'd1 << N) - 1);
      end
      x = N'(a); y = N'(b);
      #1;
      prod = sval(a, N) * sval(b, N);
      acc(0, low_part(a, b, N));
      for (int k = 0; k < 3; k++) acc(k + 1, prod - (sval(p[k], N) <<< N));
    end
    cnt = real'(total);
    m0 = esum[0] / cnt;
    v0 = esq[0] / cnt - m0 * m0;
    $display("  n=%0d direct truncation: max %0d mean %.2f var %.2f", N, emax[0], m0, v0);
    for (int k = 0; k < 3; k++) begin
      m = esum[k+1] / cnt;
      v = esq[k+1] / cnt - m * m;
      if (EXHAUSTIVE)
        expect_pct({NAMES[k], " max"}, 100.0 * real'(emax[k+1]) / real'(emax[0]), EXP[3*k]);
      expect_pct({NAMES[k], " mean"}, 100.0 * m / m0, EXP[3*k+1]);
      expect_pct({NAMES[k], " var"},  100.0 * v / v0, EXP[3*k+2]);
    end
    done = 1'b1;
  end
endmodule
