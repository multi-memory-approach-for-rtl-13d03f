// icdf_rom: one memory layer of the inverse-CDF sampler.
//
// The layer covers the probabilities [U_LO, 1) of the target CDF, split into
// DEPTH equal intervals.  Entry i holds the x-value F^-1(u_i) at the middle of
// interval i, u_i = U_LO + (1 - U_LO) * (i + 0.5) / DEPTH, scaled by SCALE,
// rounded to the nearest integer and saturated to DATA_W bits.  Addressing the
// table with a uniform random index therefore returns a sample of the target
// distribution restricted to that probability range.
//
// The contents are computed while the design is elaborated from the
// closed-form inverse CDF (rng_pkg::icdf_value): exponential with mean SCALE,
// or the positive half of a zero-mean Gaussian with standard deviation SCALE.
//
// Interface and timing: synchronous read, `data` is the entry at the `addr`
// of the previous clock edge (one cycle latency, block-RAM style).
//
// Storing equally spaced probability points of the CDF follows the
// architecture; the midpoint placement, the rounding and the saturation are
// this design's choices.
module icdf_rom #(
  parameter rng_pkg::dist_e DIST   = rng_pkg::EXPONENTIAL,
  parameter int unsigned    DEPTH  = 2048,
  parameter int unsigned    DATA_W = 13,
  parameter real            SCALE  = 600.0,
  parameter real            U_LO   = 0.0
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [DATA_W-1:0]        data
);

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int unsigned i = 0; i < DEPTH; i++)
      t[i] = DATA_W'(rng_pkg::icdf_value(DIST, SCALE, U_LO, DEPTH, i, DATA_W));
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= TABLE[addr];

endmodule
