// Majority voter: 1 when more than half of its N inputs are 1. In the scheme I
// encoder it decides odd inversion (more than half of the line pairs gain from
// it); in the scheme II decoder it tells half from full inversion. With N odd
// there is no tie. Combinational: a ones count compared with N/2.
module majority_voter #(
  parameter int N = 31
) (
  input  logic [N-1:0] votes,
  output logic         majority
);
  localparam int CW = $clog2(N + 1);
  logic [CW-1:0] n_ones;

  ones_counter #(.N(N)) u_count (.bits_in(votes), .count(n_ones));

  always_comb majority = ({1'b0, n_ones} << 1) > (CW + 1)'(N);
endmodule
