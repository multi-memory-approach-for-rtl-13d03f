// lfsr: Fibonacci linear feedback shift register.
//
// Every enabled clock the register shifts one place towards the MSB and the
// new LSB is the XOR of the tapped bits (those set in TAPS), as in the classic
// one-XOR-tree LFSR.  With a primitive feedback polynomial the register walks
// through all 2^W - 1 non-zero states.
//
// Interface: `load` (synchronous, has priority over `en`) copies `seed` into
// the register; `en` advances it by one step; `state` is the register itself,
// so a new value appears one clock after the edge that computed it.
//
// The shift/XOR structure and the use of a seed follow the architecture.
// The direction of the shift, the 42-bit polynomial (x^42+x^41+x^20+x^19+1)
// and replacing an all-zero seed (which would lock the register) by 1 are this
// design's choices.
module lfsr #(
  parameter int unsigned   W    = rng_pkg::LFSR42_W,
  parameter logic [W-1:0]  TAPS = rng_pkg::LFSR42_TAPS
) (
  input  logic         clk,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         en,
  output logic [W-1:0] state
);

  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (load)    state <= (seed == '0) ? W'(1) : seed;
    else if (en) state <= {state[W-2:0], feedback};
  end

endmodule
