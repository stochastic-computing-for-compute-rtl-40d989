// sc_accum: stochastic accumulator, the stochastic-to-binary converter.
//
// The value of a stream is recovered by counting its ones over a known
// number of cycles. This counter is signed: when `neg` says the bit came from
// a term of negative sign it counts down instead of up, so one counter sums
// the positive and negative parts of a signed dot product. `clr` zeroes it,
// and has priority over counting. One cycle per bit; `count` is registered.
// Counting ones follows the design's description; the signed up/down form
// is this design's way of handling the negative coefficients.
module sc_accum #(
  parameter int unsigned CW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic                 bit_in,
  input  logic                 neg,
  output logic signed [CW-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n || clr)      count <= '0;
    else if (en && bit_in)  count <= neg ? count - CW'(1) : count + CW'(1);
  end

endmodule
