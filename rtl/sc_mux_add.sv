// sc_mux_add: scaled stochastic adder over N = 2^S inputs.
//
// A tree of 2-input multiplexers: level l chooses between pairs with select
// bit sel[l]. With uniformly random, independent select bits every input is
// passed with probability 1/N, so the output stream's value is the mean of
// the input values (sum scaled by 1/N). The index of the chosen input is also
// given out, so a following accumulator can apply that input's sign.
// Combinational. The scaled MUX adder follows the design's description; the
// sign side output is this design's addition for terms of negative sign.
module sc_mux_add #(
  parameter int unsigned N = 4,
  localparam int unsigned S = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] in_bits,
  input  logic [S-1:0] sel,
  output logic         out_bit,
  output logic [S-1:0] out_idx
);

  initial begin
    assert (N >= 2 && (1 << S) == N) else $error("sc_mux_add: N must be a power of two");
  end

  // level[0] holds the inputs; each level halves the number of candidates.
  logic [N-1:0] level [S+1];

  always_comb begin
    level[0] = in_bits;
    for (int l = 0; l < S; l++) begin
      level[l+1] = '0;
      for (int i = 0; i < (N >> (l + 1)); i++)
        level[l+1][i] = sel[l] ? level[l][2*i+1] : level[l][2*i];
    end
  end

  assign out_bit = level[S][0];
  assign out_idx = sel;

endmodule
