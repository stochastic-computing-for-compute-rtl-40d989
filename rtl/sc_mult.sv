// sc_mult: stochastic multiplier, N lanes.
//
// For two independent unipolar streams the probability that both bits are 1
// in the same cycle is the product of their values, so a single AND gate per
// lane multiplies. Combinational, no latency. The operands must come from
// uncorrelated random sources (different LFSRs in this design); with
// correlated streams the gate computes min(a,b) instead.
module sc_mult #(
  parameter int unsigned N = 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);

  assign p = a & b;

endmodule
