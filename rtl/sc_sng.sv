// sc_sng: stochastic number generator built as a weighted binary generator
// (WBG, after Gupta and Kumaresan).
//
// The random number rnd is turned into W mutually exclusive weight bits:
// w[i] is 1 when rnd[i] is the highest set bit of rnd, which happens for
// 2^i of the 2^W-1 non-zero LFSR states. The output bit is the OR of the
// weight bits whose input bit x[i] is set, so over one full LFSR period the
// stream holds exactly x ones: its value is x/(2^W-1). Purely
// combinational; one output bit per LFSR step.
// The WBG as the binary-to-stochastic converter follows the design's
// description; its gate form here is the textbook one.
module sc_sng #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] rnd,
  output logic         bit_out
);

  logic [W-1:0] weight;

  always_comb begin
    logic higher;
    higher = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      weight[i] = rnd[i] & ~higher;
      higher    = higher | rnd[i];
    end
  end

  assign bit_out = |(x & weight);

endmodule
