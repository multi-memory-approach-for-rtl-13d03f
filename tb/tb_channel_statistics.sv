// tb_channel_statistics: the statistical evaluation of one channel, run on
// the full-size design.  One million samples of each generator are collected
// and compared with the target distributions:
//   energy (exponential, mean 600):  mean within 1%, variance within 3% of
//     360000, skewness within 0.1 of 2, excess kurtosis within 0.6 of 6,
//     Kolmogorov-Smirnov distance below 0.005, fraction above the 99.9%
//     quantile (600 ln 1000) within 10% of 0.001;
//   noise (Gaussian, sigma 20 MeV at scale 512): mean within 0.01 sigma of 0,
//     variance within 3%, |skewness| < 0.02, |excess kurtosis| < 0.05,
//     KS distance below 0.005, P(|x| > 3 sigma) within 10% of 0.0027.
// The KS distance accounts for the integer output grid: a sample v stands for
// the continuous interval [v - 0.5, v + 0.5).
module tb_channel_statistics;

  localparam int  N   = 1000000;
  localparam real SIG = 20.0 * 512.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               rst_n;
  logic [12:0]        energy;
  logic               energy_valid;
  logic [1:0]         energy_layer;
  logic signed [16:0] noise;
  logic               noise_valid;
  logic [1:0]         noise_layer;

  hep_channel_rng dut (
    .clk(clk), .rst_n(rst_n),
    .energy(energy), .energy_valid(energy_valid), .energy_layer(energy_layer),
    .noise(noise), .noise_valid(noise_valid), .noise_layer(noise_layer));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Standard normal CDF via the Abramowitz-Stegun erf approximation (7.1.26).
  function automatic real norm_cdf(real z);
    real x, t, y;
    x = (z < 0.0 ? -z : z) / $sqrt(2.0);
    t = 1.0 / (1.0 + 0.3275911 * x);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
               - 0.284496736) * t + 0.254829592) * t * $exp(-x * x);
    return (z < 0.0) ? 0.5 * (1.0 - y) : 0.5 * (1.0 + y);
  endfunction

  function automatic real exp_cdf(real x);
    return (x <= 0.0) ? 0.0 : 1.0 - $exp(-x / 600.0);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Histograms over the output grids.
  int ehist [8192];
  localparam int NOFF = 65536;
  int nhist [2 * NOFF];

  initial begin
    int   ne = 0, nn = 0, e_tail = 0, n_tail = 0;
    real  m1, m2, m3, m4, mean, var_, skew, kurt, d, cum, f_lo, f_hi, x;
    real  ed [4], nd [4];   // sums of x, x^2, x^3, x^4

    foreach (ed[i]) begin ed[i] = 0.0; nd[i] = 0.0; end
    foreach (ehist[i]) ehist[i] = 0;
    foreach (nhist[i]) nhist[i] = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    while (ne < N || nn < N) begin
      @(posedge clk); #1;
      if (energy_valid && ne < N) begin
        ne++;
        ehist[energy]++;
        x = real'(energy);
        ed[0] += x; ed[1] += x * x; ed[2] += x * x * x; ed[3] += x * x * x * x;
        if (x > 600.0 * $ln(1000.0)) e_tail++;
      end
      if (noise_valid && nn < N) begin
        nn++;
        nhist[int'(noise) + NOFF]++;
        x = real'(noise) / SIG;
        nd[0] += x; nd[1] += x * x; nd[2] += x * x * x; nd[3] += x * x * x * x;
        if (x > 3.0 || x < -3.0) n_tail++;
      end
    end

    // Energy moments.
    m1 = ed[0] / N; m2 = ed[1] / N; m3 = ed[2] / N; m4 = ed[3] / N;
    mean = m1;
    var_ = m2 - m1 * m1;
    skew = (m3 - 3.0 * m1 * m2 + 2.0 * m1 * m1 * m1) / (var_ * $sqrt(var_));
    kurt = (m4 - 4.0 * m1 * m3 + 6.0 * m1 * m1 * m2 - 3.0 * m1 * m1 * m1 * m1) / (var_ * var_) - 3.0;
    d = 0.0; cum = 0.0;
    foreach (ehist[v]) begin
      if (ehist[v] == 0) continue;
      f_lo = exp_cdf(real'(v) - 0.5);
      if (cum / N - f_lo > d) d = cum / N - f_lo;
      if (f_lo - cum / N > d) d = f_lo - cum / N;
      cum += ehist[v];
      f_hi = exp_cdf(real'(v) + 0.5);
      if (cum / N - f_hi > d) d = cum / N - f_hi;
      if (f_hi - cum / N > d) d = f_hi - cum / N;
    end
    $display("energy: mean %f var %e skew %f exkurt %f D_KS %e tail(99.9%%) %0d of %0d expected",
             mean, var_, skew, kurt, d, e_tail, N / 1000);
    check("energy mean",      mean > 594.0 && mean < 606.0);
    check("energy variance",  var_ > 0.97 * 360000.0 && var_ < 1.03 * 360000.0);
    check("energy skewness",  skew > 1.9 && skew < 2.1);
    check("energy kurtosis",  kurt > 5.4 && kurt < 6.6);
    check("energy KS",        d < 0.005);
    check("energy tail",      e_tail > 0.9 * N / 1000 && e_tail < 1.1 * N / 1000);

    // Noise moments (in units of sigma).
    m1 = nd[0] / N; m2 = nd[1] / N; m3 = nd[2] / N; m4 = nd[3] / N;
    mean = m1;
    var_ = m2 - m1 * m1;
    skew = (m3 - 3.0 * m1 * m2 + 2.0 * m1 * m1 * m1) / (var_ * $sqrt(var_));
    kurt = (m4 - 4.0 * m1 * m3 + 6.0 * m1 * m1 * m2 - 3.0 * m1 * m1 * m1 * m1) / (var_ * var_) - 3.0;
    d = 0.0; cum = 0.0;
    foreach (nhist[i]) begin
      int v;
      if (nhist[i] == 0) continue;
      v = i - NOFF;
      f_lo = norm_cdf((real'(v) - 0.5) / SIG);
      if (cum / N - f_lo > d) d = cum / N - f_lo;
      if (f_lo - cum / N > d) d = f_lo - cum / N;
      cum += nhist[i];
      f_hi = norm_cdf((real'(v) + 0.5) / SIG);
      if (cum / N - f_hi > d) d = cum / N - f_hi;
      if (f_hi - cum / N > d) d = f_hi - cum / N;
    end
    $display("noise:  mean %f sigma, var %f sigma^2, skew %f exkurt %f D_KS %e P(|x|>3sigma) %e (target 2.70e-3)",
             mean, var_, skew, kurt, d, real'(n_tail) / N);
    check("noise mean",     mean > -0.01 && mean < 0.01);
    check("noise variance", var_ > 0.97 && var_ < 1.03);
    check("noise skewness", skew > -0.02 && skew < 0.02);
    check("noise kurtosis", kurt > -0.05 && kurt < 0.05);
    check("noise KS",       d < 0.005);
    check("noise tail",     real'(n_tail) / N > 0.9 * 0.0026998 && real'(n_tail) / N < 1.1 * 0.0026998);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
