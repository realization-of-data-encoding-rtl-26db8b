// Module C: inversion decision of the scheme III encoder (odd, even, full or
// none), coded as {odd_inv, even_inv} = 10, 01, 11, 00.
//
// Over P adjacent line pairs the coupling-cost gains are
//   odd inversion : 2*n_ty - P
//   even inversion: 2*n_te - P
//   full inversion: 2*(n_2 - n_4ss)
// (every pair has exactly one odd and one even line, and one-line flips move a
// pair's cost by exactly one step). The largest strictly positive gain wins; ties
// go to odd, then even, then full. Scheme III sends two inversion lines, so every
// choice is decodable without further checks. The four detector counts are the
// published inputs of Module C; the gain formulas and the tie order are this
// implementation's choice. Combinational.
module module_c
  import noc_codec_pkg::*;
#(
  parameter int P  = 32,
  parameter int CW = $clog2(P + 1)
) (
  input  logic [CW-1:0] n_ty,
  input  logic [CW-1:0] n_te,
  input  logic [CW-1:0] n_2,
  input  logic [CW-1:0] n_4ss,
  output logic          odd_inv,
  output logic          even_inv
);
  localparam int GW = CW + 3;
  logic signed [GW-1:0] gain_odd, gain_even, gain_full, best;
  inv_action_e          action;

  always_comb begin
    gain_odd  = ($signed({3'b000, n_ty}) <<< 1) - GW'(P);
    gain_even = ($signed({3'b000, n_te}) <<< 1) - GW'(P);
    gain_full = ($signed({3'b000, n_2}) - $signed({3'b000, n_4ss})) <<< 1;
    action = INV_NONE;
    best   = '0;
    if (gain_odd > best)  begin action = INV_ODD;  best = gain_odd;  end
    if (gain_even > best) begin action = INV_EVEN; best = gain_even; end
    if (gain_full > best) begin action = INV_FULL; best = gain_full; end
    {odd_inv, even_inv} = action;
  end
endmodule
