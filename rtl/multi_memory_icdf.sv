// multi_memory_icdf: segmented inverse-CDF sampler with NUM_MEM memory layers.
//
// A single table of equally spaced CDF points resolves the flat tail of a
// distribution poorly.  Here layer 0 covers the whole CDF; the positions of a
// layer above its limit (the flat part) are handed over to the next layer,
// which spends all of its DEPTH entries on just that probability range, and so
// on down to the last layer.
//
// In software the layers would be consulted one after the other.  In hardware
// every layer gets its own uniform address in the same cycle, all memories are
// read in parallel, and the choice is made afterwards by a chain of 2:1
// multiplexers built from the last layer back to the first: the mux of layer k
// passes the result of the deeper layers when addr[k] > LIMITS[k] and the
// output of memory k otherwise.  The first layer whose address is not above
// its limit therefore wins, exactly as in the sequential decision flow, with a
// fixed latency.
//
// Interface: addr[k] addresses layer k; in_valid marks valid addresses.
// Timing: 2 clock cycles from addr/in_valid to value/layer/out_valid, one
// result per clock.  Cycle 1 registers the memory outputs and the limit
// comparisons, cycle 2 registers the multiplexer chain.  `layer` reports
// which memory produced `value`.  Reset (synchronous, active low) clears the
// valid pipeline and the output registers.
//
// From the architecture: parallel addressing, the limit comparators, the
// priority multiplexer cascade starting from the last two memories, and the
// placement of each deeper layer on the range above the limit.  This design's
// choices: the "greater than" sense of the comparison, the pipeline registers
// and the layer output.
module multi_memory_icdf #(
  parameter int unsigned    NUM_MEM = 3,
  parameter int unsigned    ADDR_W  = 11,
  parameter int unsigned    DATA_W  = 13,
  parameter rng_pkg::dist_e DIST    = rng_pkg::EXPONENTIAL,
  parameter real            SCALE   = 600.0,
  parameter int unsigned    LIMITS [NUM_MEM-1] = '{1989, 1989}
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [ADDR_W-1:0]          addr [NUM_MEM],
  output logic                       out_valid,
  output logic [DATA_W-1:0]          value,
  output logic [$clog2(NUM_MEM)-1:0] layer
);

  localparam int unsigned DEPTH   = 2 ** ADDR_W;
  localparam int unsigned LAYER_W = $clog2(NUM_MEM);

  // Probability at which layer k starts: layer j+1 covers exactly what
  // positions LIMITS[j]+1 .. DEPTH-1 of layer j cover.
  function automatic real layer_start(input int unsigned k);
    real lo;
    lo = 0.0;
    for (int unsigned j = 0; j < k; j++)
      lo = lo + (1.0 - lo) * real'(LIMITS[j] + 1) / real'(DEPTH);
    return lo;
  endfunction

  logic [DATA_W-1:0]  mem_q  [NUM_MEM];
  logic [NUM_MEM-2:0] deeper_q;   // addr[k] > LIMITS[k], registered with the read
  logic               valid_q;

  for (genvar g = 0; g < NUM_MEM; g++) begin : g_layer
    icdf_rom #(
      .DIST   (DIST),
      .DEPTH  (DEPTH),
      .DATA_W (DATA_W),
      .SCALE  (SCALE),
      .U_LO   (layer_start(g))
    ) u_rom (
      .clk  (clk),
      .addr (addr[g]),
      .data (mem_q[g])
    );
  end

  for (genvar g = 0; g < NUM_MEM - 1; g++) begin : g_cmp
    always_ff @(posedge clk) deeper_q[g] <= addr[g] > ADDR_W'(LIMITS[g]);
  end

  // Multiplexer cascade, last layer first.
  logic [DATA_W-1:0]  mux_value;
  logic [LAYER_W-1:0] mux_layer;

  always_comb begin
    mux_value = mem_q[NUM_MEM-1];
    mux_layer = LAYER_W'(NUM_MEM - 1);
    for (int k = NUM_MEM - 2; k >= 0; k--) begin
      if (!deeper_q[k]) begin
        mux_value = mem_q[k];
        mux_layer = LAYER_W'(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
      value     <= '0;
      layer     <= '0;
    end else begin
      valid_q   <= in_valid;
      out_valid <= valid_q;
      value     <= mux_value;
      layer     <= mux_layer;
    end
  end

endmodule
