// Scheme II body-flit decoder.
//
// Line W-1 of the received value z is the single inversion flag. When it is 1
// the decoder must still tell odd from full inversion. It re-runs the encoder's
// Ty detectors on z against the previously received link value r and takes a
// majority vote: odd inversion flips every pair's Ty outcome, so after an odd
// inversion fewer than half of the pairs vote; the encoder only uses full
// inversion when more than half vote. Vote 0 with inv = 1 therefore means half
// (odd) inversion and vote 1 means full inversion, which the XOR stage undoes.
// Ty bank, majority voter and the half/full gating follow the published scheme II
// decoder.
//
// Interface: z = received link value, r = link value received before it
// (header flits included), x = restored body flit. Combinational.
module decoder_s2 #(
  parameter int W = 32  // link lines, flag line included; must be even
) (
  input  logic [W-1:0] z,
  input  logic [W-1:0] r,
  output logic [W-2:0] x
);
  localparam int P = W - 1;
  localparam logic [W-1:0] ODD_MASK = {(W / 2){2'b10}};

  if (W % 2 != 0) begin : g_bad_width
    $error("decoder_s2: W must be even");
  end

  logic [P-1:0] ty;
  logic         vote, half_inv, full_inv;

  for (genvar i = 0; i < P; i++) begin : g_pair
    ty_block #(.INV_HI(i % 2 == 0)) u_ty (.prev(r[i+1:i]), .cur(z[i+1:i]), .ty(ty[i]));
  end

  majority_voter #(.N(P)) u_vote (.votes(ty), .majority(vote));

  always_comb begin
    half_inv = z[W-1] & ~vote;
    full_inv = z[W-1] & vote;
    x = z[W-2:0] ^ (half_inv ? ODD_MASK[W-2:0] : '0) ^ (full_inv ? '1 : '0);
  end
endmodule
