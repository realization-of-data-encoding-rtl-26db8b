// Scheme I body-flit encoder: odd inversion or none, one inversion line.
//
// The W-line link carries a (W-1)-bit body flit on lines 0..W-2 and the
// inversion flag on line W-1. The incoming flit is widened with a 0 on line W-1
// (x_w), and every adjacent pair of lines of x_w is compared with the value the
// link holds now (y, the previously sent flit) by a Ty detector. When more than
// half of the W-1 pairs gain from odd inversion, every odd-numbered line is
// inverted. Because W is even, line W-1 is odd, so the same inversion turns the
// 0 on the flag line into inv = 1, and the flag line's own coupling is already
// counted in the vote. Structure (Ty bank, majority voter, XOR on odd lines)
// follows the published scheme I encoder; the vote threshold is derived from the
// transition cost model in noc_codec_pkg.
//
// Interface: x = body flit, y = previous link value, z = link value to send.
// Purely combinational; the caller keeps y in a register.
module encoder_s1 #(
  parameter int W = 32  // link lines, flag line included; must be even
) (
  input  logic [W-2:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);
  localparam int P = W - 1;
  localparam logic [W-1:0] ODD_MASK = {(W / 2){2'b10}};

  if (W % 2 != 0) begin : g_bad_width
    $error("encoder_s1: W must be even");
  end

  logic [W-1:0] xw;
  logic [P-1:0] ty;
  logic         half_inv;

  assign xw = {1'b0, x};

  for (genvar i = 0; i < P; i++) begin : g_pair
    ty_block #(.INV_HI(i % 2 == 0)) u_ty (.prev(y[i+1:i]), .cur(xw[i+1:i]), .ty(ty[i]));
  end

  majority_voter #(.N(P)) u_vote (.votes(ty), .majority(half_inv));

  always_comb z = xw ^ (half_inv ? ODD_MASK : '0);
endmodule
