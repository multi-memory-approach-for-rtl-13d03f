// hep_channel_rng: random sources for one simulated calorimeter channel.
//
// A real-time detector simulator needs, for every readout channel, the energy
// deposited by particles and the electronic noise.  This top level holds both
// generators side by side:
//   * energy: exponential distribution with mean 600 MeV, integer MeV,
//     three ICDF layers of 2048 x 13 bits (limits 1989, 1989);
//   * noise:  Gaussian, zero mean, sigma 20 MeV, fixed point x512, four
//     half-Gaussian layers of 512 x 16 bits plus a sign generator.
// Each produces one sample per clock from free-running LFSR-based uniform
// generators (seven 42-bit LFSRs per memory layer).  Together they store
// 3*2048*13 + 4*512*16 = 112,640 ROM bits.
//
// Interface: synchronous active-low reset reloads all seeds.  `energy_valid`
// rises 3 clocks and `noise_valid` 4 clocks after reset is released; both then
// stay high.  The *_layer outputs tell which memory layer produced each
// sample and are meant for monitoring.
//
// From the architecture: one exponential and one noise generator per channel,
// their distributions and memory organisations.  This design's choices: the
// seed bases, separate (not summed) outputs, and the layer outputs.
module hep_channel_rng #(
  parameter int unsigned EXP_SEED_BASE   = 1,
  parameter int unsigned NOISE_SEED_BASE = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [12:0]        energy,
  output logic               energy_valid,
  output logic [1:0]         energy_layer,
  output logic signed [16:0] noise,
  output logic               noise_valid,
  output logic [1:0]         noise_layer
);

  multi_memory_rng #(
    .NUM_MEM   (3),
    .ADDR_W    (11),
    .DATA_W    (13),
    .DIST      (rng_pkg::EXPONENTIAL),
    .SCALE     (600.0),
    .LIMITS    ('{1989, 1989}),
    .SEED_BASE (EXP_SEED_BASE)
  ) u_energy (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (energy_valid),
    .value (energy),
    .layer (energy_layer)
  );

  gaussian_noise_rng #(
    .SEED_BASE (NOISE_SEED_BASE)
  ) u_noise (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (noise_valid),
    .value (noise),
    .layer (noise_layer)
  );

endmodule
