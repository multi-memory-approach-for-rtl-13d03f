// tb_icdf_rom: reads every entry of three memory layers and checks each value
// against the target distribution, and checks the one-cycle read latency.
//   * exponential, mean 600, 2048 x 13 bits, layer starting at 0 and at the
//     probability where the exponential generator's third layer starts;
//   * half Gaussian, sigma 20 x 512, 512 x 16 bits, starting at probability 0.5.
// A value passes when it is the rounded x-value of its probability point
// (saturated to the word width), judged with the forward CDF.
module tb_icdf_rom;
  import rng_ref_pkg::*;

  localparam real LO3 = 1.0 - (58.0 / 2048.0) * (58.0 / 2048.0);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [10:0] a_exp;
  logic [8:0]  a_g;
  logic [12:0] q_exp0, q_exp2;
  logic [15:0] q_g;

  icdf_rom u_exp0 (.clk(clk), .addr(a_exp), .data(q_exp0));
  icdf_rom #(.U_LO(LO3)) u_exp2 (.clk(clk), .addr(a_exp), .data(q_exp2));
  icdf_rom #(.DIST(rng_pkg::HALF_GAUSSIAN), .DEPTH(512), .DATA_W(16), .SCALE(10240.0), .U_LO(0.5))
    u_g (.clk(clk), .addr(a_g), .data(q_g));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sat = 0;
    for (int i = 0; i < 2048; i++) begin
      a_exp = 11'(i);
      a_g   = 9'(i % 512);
      @(posedge clk); #1;
      checks++;
      if (!entry_ok(0, 600.0, 0.0, 2048, i, 13, q_exp0)) begin
        failures++;
        $display("FAIL exp layer 0 entry %0d = %0d", i, q_exp0);
      end
      checks++;
      if (!entry_ok(0, 600.0, LO3, 2048, i, 13, q_exp2)) begin
        failures++;
        $display("FAIL exp layer 2 entry %0d = %0d", i, q_exp2);
      end
      if (q_exp2 == 13'h1FFF) sat++;
      if (i < 512) begin
        checks++;
        if (!entry_ok(1, 10240.0, 0.5, 512, i, 16, q_g)) begin
          failures++;
          $display("FAIL gauss entry %0d = %0d", i, q_g);
        end
      end
      // The read is registered: changing the address alone must not change data.
      if (i == 100) begin
        logic [12:0] held;
        held  = q_exp0;
        a_exp = 11'd2000;
        #2;
        checks++;
        if (q_exp0 != held) begin
          failures++;
          $display("FAIL read is not registered");
        end
      end
    end
    checks++;
    if (sat == 0) begin
      failures++;
      $display("FAIL no saturated entry in the last exponential layer");
    end
    $display("saturated entries in the last exponential layer: %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
