// tb_lfsr: checks the LFSR against a bit-serial reference model.
//   * a 5-bit instance with x^5 + x^3 + 1 must return to its seed after
//     exactly 31 steps and visit every non-zero state once;
//   * a default (42-bit) instance is compared with the model step by step,
//     with `en` toggled at random and a reload in the middle;
//   * an all-zero seed must load as 1.
module tb_lfsr;
  import rng_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // 5-bit instance.
  logic       load5, en5;
  logic [4:0] seed5, st5;
  lfsr #(.W(5), .TAPS(5'b10100)) u_l5 (.clk(clk), .load(load5), .seed(seed5), .en(en5), .state(st5));

  // Default instance.
  logic        load42, en42;
  logic [41:0] seed42, st42;
  lfsr u_l42 (.clk(clk), .load(load42), .seed(seed42), .en(en42), .state(st42));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [32];
    longint unsigned model;
    int period;

    load5 = 1; en5 = 0; seed5 = 5'h13;
    load42 = 1; en42 = 0; seed42 = 42'h2A5_5A5A_1234;
    @(posedge clk); #1;
    load5 = 0; en5 = 1;
    load42 = 0;

    // Period of the 5-bit register.
    foreach (seen[i]) seen[i] = 0;
    period = 0;
    model = 64'h13;
    do begin
      checks++;
      if (st5 != 5'(model)) begin
        failures++;
        $display("FAIL lfsr5 step %0d: got %h want %h", period, st5, model);
      end
      if (seen[st5]) begin
        failures++;
        $display("FAIL lfsr5 state %h repeated before the end of the period", st5);
      end
      seen[st5] = 1;
      model = lfsr_next(model, 5, 64'b10100);
      @(posedge clk); #1;
      period++;
    end while (st5 != 5'h13 && period < 40);
    checks++;
    if (period != 31) begin
      failures++;
      $display("FAIL lfsr5 period %0d, want 31", period);
    end

    // 42-bit register against the model.
    model = 64'h2A5_5A5A_1234;
    for (int i = 0; i < 3000; i++) begin
      bit en;
      en = ($urandom % 4) != 0;
      if (i == 1500) begin
        load42 = 1; seed42 = 42'h3FF_0000_0001; en42 = en;
        @(posedge clk); #1;
        load42 = 0;
        model = 64'h3FF_0000_0001;
      end else begin
        en42 = en;
        @(posedge clk); #1;
        if (en) model = lfsr_next(model, 42, 64'h300_000C_0000);
      end
      checks++;
      if (st42 != 42'(model)) begin
        failures++;
        $display("FAIL lfsr42 step %0d: got %h want %h", i, st42, model);
      end
    end

    // Zero seed.
    load42 = 1; seed42 = '0;
    @(posedge clk); #1;
    load42 = 0; en42 = 0;
    checks++;
    if (st42 != 42'd1) begin
      failures++;
      $display("FAIL zero seed loaded as %h", st42);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
