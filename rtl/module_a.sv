// Module A: inversion decision of the scheme II encoder (odd, full or none).
//
// Over P adjacent line pairs, with n_ty pairs that gain from odd inversion,
// n_2 Type II pairs and n_4ss "T4**" pairs, the coupling-cost gains are
//   odd inversion : 2*n_ty - P          (every pair moves one cost step)
//   full inversion: 2*(n_2 - n_4ss)     (Type II -> IV saves 2, T4** -> II costs 2)
// The largest positive gain wins; on a tie odd inversion is preferred, and no
// inversion is done unless it gains strictly. Scheme II sends a single inversion
// line, so the decoder tells odd from full inversion by re-running the Ty vote
// on what it received. Full inversion is therefore only allowed when that vote
// will read 1 (full_ok, computed by the encoder on the fully inverted flit); odd
// inversion always reads 0. The gain formulas and this decodability rule are this
// implementation's own derivation from the transition tables. Combinational.
module module_a #(
  parameter int P  = 31,
  parameter int CW = $clog2(P + 1)
) (
  input  logic [CW-1:0] n_ty,
  input  logic [CW-1:0] n_2,
  input  logic [CW-1:0] n_4ss,
  input  logic          full_ok,
  output logic          half_inv,
  output logic          full_inv
);
  localparam int GW = CW + 3;
  logic signed [GW-1:0] gain_odd, gain_full;

  always_comb begin
    gain_odd  = ($signed({3'b000, n_ty}) <<< 1) - GW'(P);
    gain_full = ($signed({3'b000, n_2}) - $signed({3'b000, n_4ss})) <<< 1;
    half_inv  = 1'b0;
    full_inv  = 1'b0;
    if (full_ok && gain_full > 0 && gain_full > gain_odd) full_inv = 1'b1;
    else if (gain_odd > 0)                                 half_inv = 1'b1;
  end
endmodule
