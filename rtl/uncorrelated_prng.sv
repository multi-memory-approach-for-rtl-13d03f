// uncorrelated_prng: uniform pseudo-random numbers from M interleaved LFSRs.
//
// Adjacent outputs of a single LFSR are correlated because they share most of
// their bits.  Here M LFSRs, each started from its own seed, all advance every
// clock, and a counter modulo M steers a multiplexer so that consecutive
// outputs come from different LFSRs.  The same LFSR is revisited only every M
// clocks, by which time it has shifted M more bits.
//
// Because one LFSR is read again exactly M clocks (M shifts) later, its low
// OUT_W - M register bits reappear M places higher in the next number it
// supplies.  Taken in register order, those shared bits would sit at the low
// weights of one number and the high weights of the next, giving an
// autocorrelation of about 0.008 at lag M for 11 bits out of 7 LFSRs.  The
// output word is therefore assembled from the register bits in the order
//   [0 .. OUT_W-M-1], [M .. OUT_W-1], [OUT_W-M .. M-1]   (LSB first),
// which puts the shared bits on the lowest weights of both numbers and cuts
// that correlation to about 0.001.  (When OUT_W <= M nothing is shared and
// the order is plain; when OUT_W > 2M the plain order is kept as well.)
//
// Interface: while `rst_n` is low every LFSR loads its entry of `seeds` and
// the counter clears.  `rnd` holds OUT_W bits of the selected LFSR in the
// order above, registered: after reset is released, `rnd` is valid from the
// second clock edge on and changes every clock.
//
// From the architecture: M parallel LFSRs (M = 7), distinct seeds, a
// counter modulo M driving the multiplexer, 42-bit LFSRs and 11-bit outputs.
// This design's choices: the output bit positions and their order, a
// registered output and a synchronous reset that loads the seeds.  The bit
// order serves the low autocorrelation (below 1.5e-3 for lags 1 to 100)
// reported for the architecture.
module uncorrelated_prng #(
  parameter int unsigned        N_LFSR = 7,
  parameter int unsigned        LFSR_W = rng_pkg::LFSR42_W,
  parameter logic [LFSR_W-1:0]  TAPS   = rng_pkg::LFSR42_TAPS,
  parameter int unsigned        OUT_W  = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LFSR_W-1:0] seeds [N_LFSR],
  output logic [OUT_W-1:0]  rnd
);

  localparam int unsigned SEL_W = (N_LFSR > 1) ? $clog2(N_LFSR) : 1;

  typedef int unsigned order_t [OUT_W];

  // Register bit that supplies output weight w.
  function automatic order_t bit_order();
    order_t o;
    int unsigned a;
    a = OUT_W - N_LFSR;   // bits shared between two reads of one LFSR
    for (int unsigned w = 0; w < OUT_W; w++) begin
      if (OUT_W <= N_LFSR || OUT_W > 2 * N_LFSR) o[w] = w;
      else if (w < a)                            o[w] = w;
      else if (w < 2 * a)                        o[w] = N_LFSR + w - a;
      else                                       o[w] = w - a;
    end
    return o;
  endfunction

  localparam order_t ORDER = bit_order();

  logic [LFSR_W-1:0] state [N_LFSR];
  logic [SEL_W-1:0]  sel;

  for (genvar g = 0; g < N_LFSR; g++) begin : g_lfsr
    lfsr #(.W(LFSR_W), .TAPS(TAPS)) u_lfsr (
      .clk   (clk),
      .load  (!rst_n),
      .seed  (seeds[g]),
      .en    (1'b1),
      .state (state[g])
    );
  end

  // Counter modulo N_LFSR.
  always_ff @(posedge clk) begin
    if (!rst_n)                           sel <= '0;
    else if (sel == SEL_W'(N_LFSR - 1))   sel <= '0;
    else                                  sel <= sel + 1'b1;
  end

  logic [OUT_W-1:0]  picked;
  logic [OUT_W-1:0]  word;

  always_comb begin
    picked = state[sel][OUT_W-1:0];
    for (int unsigned w = 0; w < OUT_W; w++) word[w] = picked[ORDER[w]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rnd <= '0;
    else        rnd <= word;
  end

endmodule
