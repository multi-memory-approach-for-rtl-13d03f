// tb_multi_memory_rng: runs the exponential generator at its full size
// (three layers of 2048 x 13 bits, limits 1989, 1989, seven 42-bit LFSRs per
// layer) for 300000 samples.  A model of the three uniform streams, built
// from the same seeds, predicts the addresses; every sample's layer must be
// the one the decision flow picks and its value the rounded x-value of that
// layer's probability point.  It also checks that valid rises exactly 3
// clocks after reset, that every layer is used, and that the sample mean
// (600 for the target) is within 1% of it.  The reset is applied twice to
// check that the sequence restarts.
module tb_multi_memory_rng;
  import rng_ref_pkg::*;

  localparam int NUM_MEM = 3, ADDR_W = 11, M = 7, W = 42;
  localparam int N_SAMPLES = 300000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst_n, valid;
  logic [12:0] value;
  logic [1:0]  layer;

  multi_memory_rng dut (.clk(clk), .rst_n(rst_n), .valid(valid), .value(value), .layer(layer));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    prng_model    streams [NUM_MEM];
    table_checker tc;
    int unsigned  lim [] = '{1989, 1989};
    int           hits [NUM_MEM];
    real          sum = 0.0;
    int           lat;

    tc = new(0, 600.0, 2048, 13, lim);
    for (int m = 0; m < NUM_MEM; m++) begin
      longint unsigned s [];
      s = new[M];
      foreach (s[j]) s[j] = rng_pkg::make_seed(1, m * M + j) & ((64'd1 << W) - 1);
      streams[m] = new(s, W, 64'h300_000C_0000, ADDR_W);
    end
    foreach (hits[i]) hits[i] = 0;

    rst_n = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    lat = 0;
    do begin
      @(posedge clk); #1;
      lat++;
    end while (!valid && lat < 10);
    checks++;
    if (lat != 3) begin
      failures++;
      $display("FAIL valid after %0d clocks, want 3", lat);
    end

    for (int t = 0; t < n; t++) begin
      longint unsigned a [];
      int l;
      a = new[NUM_MEM];
      foreach (a[m]) a[m] = streams[m].next();
      l = pick_layer(a, lim);
      hits[l]++;
      checks++;
      if (!valid || layer != 2'(l) || !tc.check(l, a[l], value)) begin
        failures++;
        if (failures < 10)
          $display("FAIL sample %0d: valid %b layer %0d value %0d, want layer %0d addr %0d",
                   t, valid, layer, value, l, a[l]);
      end
      sum += value;
      @(posedge clk); #1;
    end
    if (n < 100000) return;  // short rerun: the sequence check above is enough
    foreach (hits[i]) begin
      checks++;
      $display("layer %0d selected %0d times", i, hits[i]);
      if (hits[i] == 0) failures++;
    end
    checks++;
    $display("sample mean %f (target 600)", sum / n);
    if (sum / n < 594.0 || sum / n > 606.0) failures++;
  endtask

  initial begin
    run(N_SAMPLES);
    run(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
