// multi_memory_rng: complete non-uniform random number generator.
//
// One uncorrelated uniform PRNG per memory layer produces that layer's
// address every clock; the segmented inverse-CDF sampler turns the NUM_MEM
// addresses into one sample of the target distribution per clock.  The
// defaults are the exponential generator: mean 600 (MeV), three layers of
// 2048 entries of 13 bits, limits 1989 and 1989.
//
// Interface: after `rst_n` is released, `valid` rises 3 clocks later (1 cycle
// in the PRNG output register, 2 in the sampler) and stays high; `value` and
// `layer` then change every clock.  Reset reloads all LFSR seeds, so the
// output sequence after each reset is the same.
//
// From the architecture: one uncorrelated PRNG per memory, seven 42-bit LFSRs
// each, 11-bit addresses, 2048-entry layers, three layers and the limit 1989.
// This design's choices: seeds derived from SEED_BASE by a hash, the 13-bit
// word (the memory budget of the exponential design divided by its 6144
// entries) and the valid signal.
module multi_memory_rng #(
  parameter int unsigned    NUM_MEM   = 3,
  parameter int unsigned    ADDR_W    = 11,
  parameter int unsigned    DATA_W    = 13,
  parameter rng_pkg::dist_e DIST      = rng_pkg::EXPONENTIAL,
  parameter real            SCALE     = 600.0,
  parameter int unsigned    LIMITS [NUM_MEM-1] = '{1989, 1989},
  parameter int unsigned    N_LFSR    = 7,
  parameter int unsigned    LFSR_W    = rng_pkg::LFSR42_W,
  parameter logic [LFSR_W-1:0] TAPS   = rng_pkg::LFSR42_TAPS,
  parameter int unsigned    SEED_BASE = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       valid,
  output logic [DATA_W-1:0]          value,
  output logic [$clog2(NUM_MEM)-1:0] layer
);

  logic [ADDR_W-1:0] addr [NUM_MEM];
  logic              addr_valid;

  for (genvar m = 0; m < NUM_MEM; m++) begin : g_stream
    logic [LFSR_W-1:0] seeds [N_LFSR];
    for (genvar j = 0; j < N_LFSR; j++) begin : g_seed
      assign seeds[j] = LFSR_W'(rng_pkg::make_seed(SEED_BASE, m * N_LFSR + j));
    end
    uncorrelated_prng #(
      .N_LFSR (N_LFSR),
      .LFSR_W (LFSR_W),
      .TAPS   (TAPS),
      .OUT_W  (ADDR_W)
    ) u_prng (
      .clk   (clk),
      .rst_n (rst_n),
      .seeds (seeds),
      .rnd   (addr[m])
    );
  end

  // The PRNG outputs are valid from the first clock after reset.
  always_ff @(posedge clk) begin
    if (!rst_n) addr_valid <= 1'b0;
    else        addr_valid <= 1'b1;
  end

  multi_memory_icdf #(
    .NUM_MEM (NUM_MEM),
    .ADDR_W  (ADDR_W),
    .DATA_W  (DATA_W),
    .DIST    (DIST),
    .SCALE   (SCALE),
    .LIMITS  (LIMITS)
  ) u_icdf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (addr_valid),
    .addr      (addr),
    .out_valid (valid),
    .value     (value),
    .layer     (layer)
  );

endmodule
