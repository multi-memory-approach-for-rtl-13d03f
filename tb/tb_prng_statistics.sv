// tb_prng_statistics: statistical validation of the uniform address streams.
// Four uncorrelated_prng instances with 11-bit outputs and distinct seeds (the
// largest number of streams one generator uses at once) each produce one
// million addresses.  Checked on stream 0:
//   * Kolmogorov-Smirnov distance to the discrete uniform distribution on
//     0..2047 below 2.5e-3;
//   * runs test above/below the median, |z| < 4;
//   * normalised autocorrelation for lags 1..100 below 5e-3 in magnitude;
// and on all four: pairwise cross-correlation below 5e-3 in magnitude.
// With 10^6 samples a correlation estimate of independent data has a
// standard deviation of 10^-3, so these bounds are about 5 sigma.
module tb_prng_statistics;

  localparam int N = 1000000, S = 4, M = 7, W = 42, OUT_W = 11;
  localparam int MAXLAG = 100;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic             rst_n;
  logic [OUT_W-1:0] rnd [S];

  for (genvar s = 0; s < S; s++) begin : g_stream
    logic [W-1:0] seeds [M];
    for (genvar j = 0; j < M; j++) begin : g_seed
      assign seeds[j] = W'(rng_pkg::make_seed(1, s * M + j));
    end
    uncorrelated_prng u_prng (.clk(clk), .rst_n(rst_n), .seeds(seeds), .rnd(rnd[s]));
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  real x [S][];

  initial begin
    int   hist [2048];
    real  mean [S], sd [S];
    real  d, cum, ac, acmax, cc, ccmax, z, mu, var_r;
    int   runs, n1, n2;
    int   worst_lag;

    foreach (x[s]) x[s] = new[N];
    foreach (hist[i]) hist[i] = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < N; t++) begin
      @(posedge clk); #1;
      for (int s = 0; s < S; s++) x[s][t] = real'(rnd[s]);
      hist[rnd[0]]++;
    end

    // KS distance to the discrete uniform distribution.
    d = 0.0; cum = 0.0;
    foreach (hist[v]) begin
      real diff;
      cum += hist[v];
      diff = cum / N - real'(v + 1) / 2048.0;
      if (diff < 0.0) diff = -diff;
      if (diff > d) d = diff;
    end

    // Runs above / below the median.
    runs = 1; n1 = 0; n2 = 0;
    for (int t = 0; t < N; t++) begin
      if (x[0][t] > 1023.5) n1++; else n2++;
      if (t > 0 && ((x[0][t] > 1023.5) != (x[0][t-1] > 1023.5))) runs++;
    end
    mu    = 2.0 * n1 * n2 / N + 1.0;
    var_r = (mu - 1.0) * (mu - 2.0) / (N - 1.0);
    z     = (runs - mu) / $sqrt(var_r);

    for (int s = 0; s < S; s++) begin
      real acc, acc2;
      acc = 0.0; acc2 = 0.0;
      for (int t = 0; t < N; t++) acc += x[s][t];
      mean[s] = acc / N;
      for (int t = 0; t < N; t++) acc2 += (x[s][t] - mean[s]) ** 2;
      sd[s] = $sqrt(acc2 / N);
    end

    // Autocorrelation of stream 0.
    acmax = 0.0; worst_lag = 0;
    for (int k = 1; k <= MAXLAG; k++) begin
      real acc;
      acc = 0.0;
      for (int t = 0; t + k < N; t++) acc += (x[0][t] - mean[0]) * (x[0][t+k] - mean[0]);
      ac = acc / (N - k) / (sd[0] * sd[0]);
      if (ac < 0.0) ac = -ac;
      if (ac > acmax) begin acmax = ac; worst_lag = k; end
    end

    // Cross-correlation between the streams.
    ccmax = 0.0;
    for (int a = 0; a < S; a++)
      for (int b = a + 1; b < S; b++) begin
        real acc;
        acc = 0.0;
        for (int t = 0; t < N; t++) acc += (x[a][t] - mean[a]) * (x[b][t] - mean[b]);
        cc = acc / N / (sd[a] * sd[b]);
        if (cc < 0.0) cc = -cc;
        if (cc > ccmax) ccmax = cc;
      end

    $display("KS %e  runs z %f  max |AC| lags 1-%0d %e (lag %0d)  max |cross-corr| %e",
             d, z, MAXLAG, acmax, worst_lag, ccmax);
    check("KS distance",       d < 2.5e-3);
    check("runs test",         z > -4.0 && z < 4.0);
    check("autocorrelation",   acmax < 5e-3);
    check("cross-correlation", ccmax < 5e-3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
