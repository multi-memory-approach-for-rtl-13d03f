// tb_hep_channel_rng: end-to-end test of one simulated channel at its full
// size (no parameter overrides).  For 400000 clocks it predicts both outputs
// from models of all uniform streams (three for the energy, four plus the sign
// stream for the noise) and checks every energy and noise sample: layer,
// sign and table value.  It then checks the distributions (energy mean 600
// within 1%, noise mean near 0 and standard deviation 20*512 within 2%),
// the valid latencies (3 and 4 clocks), and counts each mechanism of the
// design: every memory layer of both generators taking the output, and both
// noise signs.  A mechanism that never occurs counts as a failure.
module tb_hep_channel_rng;
  import rng_ref_pkg::*;

  localparam int M = 7, W = 42;
  localparam int N_SAMPLES = 400000;
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
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic prng_model make_stream(int base, int idx0, int out_w);
    longint unsigned s [];
    prng_model p;
    s = new[M];
    foreach (s[j]) s[j] = rng_pkg::make_seed(base, idx0 + j) & ((64'd1 << W) - 1);
    p = new(s, W, 64'h300_000C_0000, out_w);
    return p;
  endfunction

  initial begin
    prng_model    es [3];
    prng_model    ns [4];
    prng_model    sg;
    table_checker etc, ntc;
    int unsigned  elim [] = '{1989, 1989};
    int unsigned  nlim [] = '{277, 335, 445};
    int           ehits [3];
    int           nhits [4];
    int           neg = 0, pos = 0, ce = 0, cn = 0;
    int           elat = -1, nlat = -1;
    real          esum = 0.0, nsum = 0.0, nsum2 = 0.0, nstd;
    longint unsigned ea [$], na [$];
    // Expected samples wait in queues until their valid appears.
    int           eq_layer [$], nq_layer [$];
    longint unsigned eq_addr [$], nq_addr [$];
    bit           nq_sign [$];

    etc = new(0, 600.0, 2048, 13, elim);
    ntc = new(1, SIG, 512, 16, nlim);
    for (int m = 0; m < 3; m++) es[m] = make_stream(1, m * M, 11);
    for (int m = 0; m < 4; m++) ns[m] = make_stream(2, m * M, 9);
    sg = make_stream(2, 4 * M, 1);
    foreach (ehits[i]) ehits[i] = 0;
    foreach (nhits[i]) nhits[i] = 0;

    rst_n = 0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < N_SAMPLES + 4; t++) begin
      @(posedge clk); #1;
      // The uniform streams produce one number per clock from the first edge on.
      begin
        longint unsigned a [];
        a = new[3];
        foreach (a[m]) a[m] = es[m].next();
        eq_layer.push_back(pick_layer(a, elim));
        eq_addr.push_back(a[pick_layer(a, elim)]);
        a = new[4];
        foreach (a[m]) a[m] = ns[m].next();
        nq_layer.push_back(pick_layer(a, nlim));
        nq_addr.push_back(a[pick_layer(a, nlim)]);
        nq_sign.push_back(sg.next() != 0);
      end
      if (energy_valid) begin
        int l;
        if (elat < 0) elat = t + 1;
        l = eq_layer.pop_front();
        ehits[l]++;
        ce++;
        checks++;
        if (energy_layer != 2'(l) || !etc.check(l, eq_addr.pop_front(), energy)) begin
          failures++;
          if (failures < 10) $display("FAIL energy %0d: layer %0d value %0d, want layer %0d",
                                      ce, energy_layer, energy, l);
        end
        esum += energy;
      end
      if (noise_valid) begin
        int l;
        bit s;
        longint unsigned mag;
        if (nlat < 0) nlat = t + 1;
        l = nq_layer.pop_front();
        s = nq_sign.pop_front();
        mag = (noise < 0) ? longint'(-noise) : longint'(noise);
        nhits[l]++;
        cn++;
        checks++;
        if (noise_layer != 2'(l) || (noise != 0 && (noise < 0) != s) ||
            !ntc.check(l, nq_addr.pop_front(), mag)) begin
          failures++;
          if (failures < 10) $display("FAIL noise %0d: layer %0d value %0d, want layer %0d sign %0d",
                                      cn, noise_layer, noise, l, s);
        end
        if (noise < 0) neg++; else pos++;
        nsum  += real'(noise);
        nsum2 += real'(noise) * real'(noise);
      end
    end

    nstd = $sqrt(nsum2 / cn - (nsum / cn) * (nsum / cn));
    $display("energy: %0d samples, latency %0d, mean %f", ce, elat, esum / ce);
    $display("noise:  %0d samples, latency %0d, mean %f, std %f", cn, nlat, nsum / cn, nstd);
    checks += 6;
    if (elat != 3) begin failures++; $display("FAIL energy latency %0d", elat); end
    if (nlat != 4) begin failures++; $display("FAIL noise latency %0d", nlat); end
    if (esum / ce < 594.0 || esum / ce > 606.0) failures++;
    if (nsum / cn < -0.02 * SIG || nsum / cn > 0.02 * SIG) failures++;
    if (nstd < 0.98 * SIG || nstd > 1.02 * SIG) failures++;
    if (ce < N_SAMPLES || cn < N_SAMPLES) failures++;
    foreach (ehits[i]) begin
      checks++;
      $display("mechanism: energy from memory layer %0d: %0d times", i, ehits[i]);
      if (ehits[i] == 0) failures++;
    end
    foreach (nhits[i]) begin
      checks++;
      $display("mechanism: noise from memory layer %0d: %0d times", i, nhits[i]);
      if (nhits[i] == 0) failures++;
    end
    checks += 2;
    $display("mechanism: negative noise sign %0d times, positive %0d times", neg, pos);
    if (neg == 0) failures++;
    if (pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
