// tb_uncorrelated_prng: compares the interleaved-LFSR generator with a model
// of M round-robin LFSRs.  Checks the reset value, the one-cycle output
// latency, every output for 20000 clocks after each of two resets (different
// seeds, one of them zero), and that the output histogram over the 11-bit
// range is roughly flat (every 1/16 of the range gets 1/16 of the samples
// within 20%).
module tb_uncorrelated_prng;
  import rng_ref_pkg::*;

  localparam int M = 7, W = 42, OUT_W = 11;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic             rst_n;
  logic [W-1:0]     seeds [M];
  logic [OUT_W-1:0] rnd;

  uncorrelated_prng dut (.clk(clk), .rst_n(rst_n), .seeds(seeds), .rnd(rnd));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, bit zero_seed);
    longint unsigned s [];
    int hist [16];
    prng_model model;
    s = new[M];
    foreach (s[i]) begin
      s[i] = {$urandom, $urandom} & ((64'd1 << W) - 1);
      seeds[i] = W'(s[i]);
    end
    if (zero_seed) begin
      s[3] = 0;
      seeds[3] = '0;
    end
    model = new(s, W, 64'h300_000C_0000, OUT_W);
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (rnd != 0) begin
      failures++;
      $display("FAIL output %h during reset", rnd);
    end
    rst_n = 1;
    foreach (hist[i]) hist[i] = 0;
    for (int t = 0; t < n; t++) begin
      longint unsigned want;
      @(posedge clk); #1;
      want = model.next();
      checks++;
      if (rnd != OUT_W'(want)) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: got %h want %h", t, rnd, want);
      end
      hist[rnd >> (OUT_W - 4)]++;
    end
    foreach (hist[i]) begin
      checks++;
      if (hist[i] < n / 16 * 8 / 10 || hist[i] > n / 16 * 12 / 10) begin
        failures++;
        $display("FAIL histogram bin %0d holds %0d of %0d", i, hist[i], n);
      end
    end
  endtask

  initial begin
    run(20000, 0);
    run(20000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
