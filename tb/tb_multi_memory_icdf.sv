// tb_multi_memory_icdf: drives random addresses, with gaps in in_valid, into a
// small three-layer exponential sampler (16-entry layers, limits 11 and 13)
// and into a four-layer half-Gaussian one (32-entry layers).  For every
// output it checks:
//   * out_valid follows in_valid exactly 2 clocks later;
//   * layer is the one the sequential decision flow picks (layer k hands over
//     to layer k+1 when its address is above its limit);
//   * value is the rounded x-value of the chosen layer's probability point.
// It counts how often each layer was selected and fails if one never was.
module tb_multi_memory_icdf;
  import rng_ref_pkg::*;

  localparam int N1 = 3, A1 = 4;
  localparam int N2 = 4, A2 = 5;
  localparam int unsigned LIM1 [N1-1] = '{11, 13};
  localparam int unsigned LIM2 [N2-1] = '{20, 25, 28};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst_n, in_valid;
  logic [A1-1:0] addr1 [N1];
  logic [A2-1:0] addr2 [N2];
  logic          ov1, ov2;
  logic [12:0]   val1;
  logic [15:0]   val2;
  logic [1:0]    lay1, lay2;

  multi_memory_icdf #(.NUM_MEM(N1), .ADDR_W(A1), .DATA_W(13), .LIMITS(LIM1)) u1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .addr(addr1),
    .out_valid(ov1), .value(val1), .layer(lay1));

  multi_memory_icdf #(.NUM_MEM(N2), .ADDR_W(A2), .DATA_W(16), .DIST(rng_pkg::HALF_GAUSSIAN),
                      .SCALE(10240.0), .LIMITS(LIM2)) u2 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .addr(addr2),
    .out_valid(ov2), .value(val2), .layer(lay2));

  typedef struct {
    bit              valid;
    longint unsigned a1 [];
    longint unsigned a2 [];
  } stim_t;

  stim_t hist [$];
  int    hits1 [N1];
  int    hits2 [N2];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lim1 [] = '{11, 13};
    int unsigned lim2 [] = '{20, 25, 28};
    rst_n = 0; in_valid = 0;
    foreach (addr1[i]) addr1[i] = '0;
    foreach (addr2[i]) addr2[i] = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (ov1 || ov2) begin
      failures++;
      $display("FAIL out_valid during reset");
    end
    rst_n = 1;
    foreach (hits1[i]) hits1[i] = 0;
    foreach (hits2[i]) hits2[i] = 0;
    for (int t = 0; t < 20000; t++) begin
      stim_t s;
      s.valid = ($urandom % 8) != 0;
      s.a1 = new[N1];
      s.a2 = new[N2];
      // Bias the addresses upwards half of the time so that deep layers occur often.
      foreach (s.a1[i]) s.a1[i] = ($urandom % 2) ? $urandom % 16 : 10 + $urandom % 6;
      foreach (s.a2[i]) s.a2[i] = ($urandom % 2) ? $urandom % 32 : 18 + $urandom % 14;
      in_valid = s.valid;
      foreach (addr1[i]) addr1[i] = A1'(s.a1[i]);
      foreach (addr2[i]) addr2[i] = A2'(s.a2[i]);
      hist.push_back(s);
      @(posedge clk); #1;
      if (hist.size() == 2) begin
        stim_t o;
        o = hist.pop_front();
        checks++;
        if (ov1 != o.valid || ov2 != o.valid) begin
          failures++;
          $display("FAIL step %0d: out_valid %b/%b, want %b", t, ov1, ov2, o.valid);
        end
        if (o.valid) begin
          int l1, l2;
          l1 = pick_layer(o.a1, lim1);
          l2 = pick_layer(o.a2, lim2);
          hits1[l1]++;
          hits2[l2]++;
          checks += 2;
          if (lay1 != 2'(l1) ||
              !entry_ok(0, 600.0, layer_start(lim1, 16, l1), 16, int'(o.a1[l1]), 13, val1)) begin
            failures++;
            $display("FAIL exp step %0d: layer %0d value %0d, want layer %0d", t, lay1, val1, l1);
          end
          if (lay2 != 2'(l2) ||
              !entry_ok(1, 10240.0, layer_start(lim2, 32, l2), 32, int'(o.a2[l2]), 16, val2)) begin
            failures++;
            $display("FAIL gauss step %0d: layer %0d value %0d, want layer %0d", t, lay2, val2, l2);
          end
        end
      end
    end
    foreach (hits1[i]) begin
      checks++;
      $display("exponential layer %0d selected %0d times", i, hits1[i]);
      if (hits1[i] == 0) failures++;
    end
    foreach (hits2[i]) begin
      checks++;
      $display("gaussian layer %0d selected %0d times", i, hits2[i]);
      if (hits2[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
