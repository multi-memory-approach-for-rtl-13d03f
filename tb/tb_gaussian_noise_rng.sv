// tb_gaussian_noise_rng: runs the Gaussian noise generator at its full size
// (four half-Gaussian layers of 512 x 16 bits, sigma 20 x 512, sign
// generator) for 300000 samples.  Models of the four address streams and of
// the sign stream, built from the same seeds, predict every sample: its layer,
// its sign (1 = negative) and its magnitude, which must be the rounded x-value
// of the chosen layer's probability point.  It also checks that valid rises
// 4 clocks after reset, that every layer and both signs occur, and the
// statistics: mean near 0, variance within 3% of (20*512)^2, and the
// fraction beyond 3 sigma within 15% of 0.0027.  Finally it re-derives the
// three limits with the relative-difference rule (1%, 1%, 2% of the largest
// step between consecutive entries) from a numerically inverted CDF and
// checks that they equal the generator's 277, 335, 445.
module tb_gaussian_noise_rng;
  import rng_ref_pkg::*;

  localparam int NUM_MEM = 4, ADDR_W = 9, M = 7, W = 42;
  localparam int N_SAMPLES = 300000;
  localparam real SIG = 20.0 * 512.0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               rst_n, valid;
  logic signed [16:0] value;
  logic [1:0]         layer;

  gaussian_noise_rng dut (.clk(clk), .rst_n(rst_n), .valid(valid), .value(value), .layer(layer));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prng_model    streams [NUM_MEM];
    prng_model    sign_model;
    table_checker tc;
    int unsigned  lim [] = '{277, 335, 445};
    int           hits [NUM_MEM];
    int           neg = 0, pos = 0, tail = 0, lat = 0;
    real          sum = 0.0, sum2 = 0.0, mean, var_;
    longint unsigned s [];

    tc = new(1, SIG, 512, 16, lim);
    s = new[M];
    for (int m = 0; m < NUM_MEM; m++) begin
      foreach (s[j]) s[j] = rng_pkg::make_seed(2, m * M + j) & ((64'd1 << W) - 1);
      streams[m] = new(s, W, 64'h300_000C_0000, ADDR_W);
    end
    foreach (s[j]) s[j] = rng_pkg::make_seed(2, NUM_MEM * M + j) & ((64'd1 << W) - 1);
    sign_model = new(s, W, 64'h300_000C_0000, 1);
    foreach (hits[i]) hits[i] = 0;

    rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!valid && lat < 10);
    checks++;
    if (lat != 4) begin
      failures++;
      $display("FAIL valid after %0d clocks, want 4", lat);
    end

    for (int t = 0; t < N_SAMPLES; t++) begin
      longint unsigned a [];
      longint unsigned mag;
      bit sgn;
      int l;
      a = new[NUM_MEM];
      foreach (a[m]) a[m] = streams[m].next();
      sgn = sign_model.next() != 0;
      l = pick_layer(a, lim);
      hits[l]++;
      mag = (value < 0) ? longint'(-value) : longint'(value);
      checks++;
      if (!valid || layer != 2'(l) || (value != 0 && (value < 0) != sgn) ||
          !tc.check(l, a[l], mag)) begin
        failures++;
        if (failures < 10)
          $display("FAIL sample %0d: layer %0d value %0d, want layer %0d sign %0d addr %0d",
                   t, layer, value, l, sgn, a[l]);
      end
      if (value < 0) neg++; else pos++;
      if (real'(mag) > 3.0 * SIG) tail++;
      sum  += real'(value);
      sum2 += real'(value) * real'(value);
      @(posedge clk); #1;
    end

    mean = sum / N_SAMPLES;
    var_ = sum2 / N_SAMPLES - mean * mean;
    $display("mean %f  std %f (target %f)  negative %0d positive %0d  beyond 3 sigma %0d",
             mean, $sqrt(var_), SIG, neg, pos, tail);
    foreach (hits[i]) begin
      checks++;
      $display("layer %0d selected %0d times", i, hits[i]);
      if (hits[i] == 0) failures++;
    end
    checks += 5;
    if (neg == 0 || pos == 0) failures++;
    if (mean < -0.02 * SIG || mean > 0.02 * SIG) failures++;
    if (var_ < 0.97 * SIG * SIG || var_ > 1.03 * SIG * SIG) failures++;
    if (tail < 0.85 * 0.0027 * N_SAMPLES || tail > 1.15 * 0.0027 * N_SAMPLES) failures++;
    if (neg < N_SAMPLES * 0.48 || neg > N_SAMPLES * 0.52) failures++;
    begin
      real fr [3] = '{0.01, 0.01, 0.02};
      real lo = 0.0;
      for (int k = 0; k < 3; k++) begin
        int r;
        r = rule_limit(1, lo, 512, fr[k]);
        $display("limit %0d by the rule: %0d (generator uses %0d)", k, r, lim[k]);
        checks++;
        if (r != int'(lim[k])) failures++;
        lo = lo + (1.0 - lo) * (r + 1) / 512.0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
