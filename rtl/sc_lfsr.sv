// sc_lfsr: maximal-length Fibonacci LFSR, the random number source of the
// stochastic number generators and of the scaled-adder selects.
//
// Each enabled clock the register shifts left by one and takes in the XOR
// of the tapped bits (TAPS mask, bit t-1 for tap t). With a primitive
// polynomial it walks through all 2^W-1 non-zero states. `reseed` (or reset)
// loads SEED, so every stochastic computation can start from the same
// sequence. `state` is the register itself: the W-bit random number of the
// current cycle, valid the cycle after a reseed.
// Using an LFSR as the random source follows the design's description; the
// Fibonacci form, the polynomials and the seeds are this design's choice.
module sc_lfsr #(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'(8'hB8),
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         reseed,
  input  logic         en,
  output logic [W-1:0] state
);

  initial begin
    assert (SEED != '0) else $error("sc_lfsr: SEED must be non-zero");
  end

  always_ff @(posedge clk) begin
    if (!rst_n || reseed) state <= SEED;
    else if (en)          state <= {state[W-2:0], ^(state & TAPS)};
  end

endmodule
