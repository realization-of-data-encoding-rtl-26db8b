// Scheme II body-flit encoder: odd inversion, full inversion or none, with one
// inversion line.
//
// Lines 0..W-2 carry the (W-1)-bit body flit, line W-1 the inversion flag; the
// flit is widened with a 0 on the flag line (x_w). Three detector banks look at
// every adjacent line pair of x_w against the current link value y: Ty (odd
// inversion would lower the pair's coupling cost), T2 (Type II transition) and
// T4** (no switching on a 01/10 pair). Their "ones" counts feed Module A, which
// picks the action with the largest coupling-cost gain. Both inversions flip
// line W-1 (odd, since W is even), so inv = 1 appears on the flag line by itself.
//
// A fourth bank, not in the published diagram, runs Ty on the fully inverted
// flit. The decoder distinguishes odd from full inversion by a Ty majority vote
// on the received flit; this bank tells Module A whether that vote would read
// "full", and full inversion is only used when it does. Without it some full
// inversions (for example a flit of pure Type II pairs) would decode wrongly.
//
// Interface: x = body flit, y = previous link value, z = link value to send.
// Purely combinational; the caller keeps y in a register.
module encoder_s2 #(
  parameter int W = 32  // link lines, flag line included; must be even
) (
  input  logic [W-2:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);
  localparam int P  = W - 1;
  localparam int CW = $clog2(P + 1);
  localparam logic [W-1:0] ODD_MASK = {(W / 2){2'b10}};

  if (W % 2 != 0) begin : g_bad_width
    $error("encoder_s2: W must be even");
  end

  logic [W-1:0]  xw, xw_n;
  logic [P-1:0]  ty, t2, t4ss, ty_full;
  logic [CW-1:0] n_ty, n_2, n_4ss;
  logic          full_ok, half_inv, full_inv;

  assign xw   = {1'b0, x};
  assign xw_n = ~xw;

  for (genvar i = 0; i < P; i++) begin : g_pair
    ty_block #(.INV_HI(i % 2 == 0)) u_ty  (.prev(y[i+1:i]), .cur(xw[i+1:i]),   .ty(ty[i]));
    t2_block                        u_t2  (.prev(y[i+1:i]), .cur(xw[i+1:i]),   .t2(t2[i]));
    t4ss_block                      u_t4  (.prev(y[i+1:i]), .cur(xw[i+1:i]),   .t4ss(t4ss[i]));
    ty_block #(.INV_HI(i % 2 == 0)) u_tyf (.prev(y[i+1:i]), .cur(xw_n[i+1:i]), .ty(ty_full[i]));
  end

  ones_counter #(.N(P)) u_cnt_ty (.bits_in(ty),   .count(n_ty));
  ones_counter #(.N(P)) u_cnt_t2 (.bits_in(t2),   .count(n_2));
  ones_counter #(.N(P)) u_cnt_t4 (.bits_in(t4ss), .count(n_4ss));
  majority_voter #(.N(P)) u_full_vote (.votes(ty_full), .majority(full_ok));

  module_a #(.P(P)) u_module_a (
    .n_ty(n_ty), .n_2(n_2), .n_4ss(n_4ss), .full_ok(full_ok),
    .half_inv(half_inv), .full_inv(full_inv)
  );

  always_comb z = xw ^ (half_inv ? ODD_MASK : '0) ^ (full_inv ? '1 : '0);
endmodule
