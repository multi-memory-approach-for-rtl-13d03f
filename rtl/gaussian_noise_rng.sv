// gaussian_noise_rng: zero-mean Gaussian noise from a half-Gaussian
// multi-memory generator and a random sign.
//
// The Gaussian is symmetric, so only |X| is tabulated: a four-layer
// multi-memory generator samples the positive half (standard deviation SIGMA,
// fixed point with FXP_SCALE, i.e. 20 MeV * 512 by default), and a separate
// uncorrelated PRNG with a 1-bit output supplies the sign: 1 makes the sample
// negative, 0 keeps it positive.
//
// Interface: `value` is a two's-complement number of DATA_W+1 bits in units of
// 1/FXP_SCALE; `layer` is the memory layer that produced the magnitude.
// Timing: `valid` rises 4 clocks after reset is released and then a new
// sample appears every clock.  The sign bit is delayed so that it is paired
// with the magnitude addressed in the same clock.
//
// From the architecture: four layers of 512 entries with 16-bit words, sigma
// 20, scale factor 512, the separate sign generator and its polarity.  This
// design's choices: the limits (computed with the relative-difference rule:
// 1% of the largest step between consecutive entries for the first two
// boundaries, 2% for the last), the sign generator built from another 7-LFSR
// PRNG, and the output format.
module gaussian_noise_rng #(
  parameter int unsigned NUM_MEM   = 4,
  parameter int unsigned ADDR_W    = 9,
  parameter int unsigned DATA_W    = 16,
  parameter real         SIGMA     = 20.0,
  parameter real         FXP_SCALE = 512.0,
  parameter int unsigned LIMITS [NUM_MEM-1] = '{277, 335, 445},
  parameter int unsigned N_LFSR    = 7,
  parameter int unsigned SEED_BASE = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       valid,
  output logic signed [DATA_W:0]     value,
  output logic [$clog2(NUM_MEM)-1:0] layer
);

  localparam int unsigned LFSR_W = rng_pkg::LFSR42_W;

  logic                       mag_valid;
  logic [DATA_W-1:0]          mag;
  logic [$clog2(NUM_MEM)-1:0] mag_layer;

  multi_memory_rng #(
    .NUM_MEM   (NUM_MEM),
    .ADDR_W    (ADDR_W),
    .DATA_W    (DATA_W),
    .DIST      (rng_pkg::HALF_GAUSSIAN),
    .SCALE     (SIGMA * FXP_SCALE),
    .LIMITS    (LIMITS),
    .N_LFSR    (N_LFSR),
    .SEED_BASE (SEED_BASE)
  ) u_magnitude (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (mag_valid),
    .value (mag),
    .layer (mag_layer)
  );

  // Sign generator: its seeds follow those of the magnitude streams.
  logic [LFSR_W-1:0] sign_seeds [N_LFSR];
  logic              sign_bit;
  logic [1:0]        sign_dly;   // matches the 2-cycle sampler latency

  for (genvar j = 0; j < N_LFSR; j++) begin : g_sign_seed
    assign sign_seeds[j] = LFSR_W'(rng_pkg::make_seed(SEED_BASE, NUM_MEM * N_LFSR + j));
  end

  uncorrelated_prng #(
    .N_LFSR (N_LFSR),
    .LFSR_W (LFSR_W),
    .OUT_W  (1)
  ) u_sign (
    .clk   (clk),
    .rst_n (rst_n),
    .seeds (sign_seeds),
    .rnd   (sign_bit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sign_dly <= '0;
      valid    <= 1'b0;
      value    <= '0;
      layer    <= '0;
    end else begin
      sign_dly <= {sign_dly[0], sign_bit};
      valid    <= mag_valid;
      value    <= sign_dly[1] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
      layer    <= mag_layer;
    end
  end

endmodule
