// Scheme III body-flit encoder: odd, even, full or no inversion, with two
// inversion lines.
//
// The link has W+1 lines: the (W-1)-bit body flit on lines 0..W-2, the odd-
// inversion flag on line W-1 and the even-inversion flag on line W. The flit is
// widened with 0 on both flag lines (x_w); W is even, so line W-1 is odd and line
// W is even, and each inversion sets its own flag line. Four detector banks
// compare every adjacent line pair of x_w with the current link value y: Ty (odd
// inversion lowers the pair's coupling cost), Te (even inversion does), T2 (Type
// II) and T4** (no switching on a 01/10 pair). Their counts feed Module C, which
// picks the action with the largest gain; full inversion is odd and even
// inversion together, so the flag lines read 10, 01, 11 or 00. The banks and
// Module C follow the published scheme III encoder; the decision rule is derived
// from the cost model in noc_codec_pkg.
//
// Interface: x = body flit, y = previous link value, z = link value to send.
// Purely combinational; the caller keeps y in a register.
module encoder_s3 #(
  parameter int W = 32  // body flit is W-1 bits, link is W+1 lines; W must be even
) (
  input  logic [W-2:0] x,
  input  logic [W:0]   y,
  output logic [W:0]   z
);
  localparam int P  = W;
  localparam int CW = $clog2(P + 1);
  localparam logic [W:0] ODD_MASK  = (W + 1)'({(W / 2){2'b10}});
  localparam logic [W:0] EVEN_MASK = ~ODD_MASK;

  if (W % 2 != 0) begin : g_bad_width
    $error("encoder_s3: W must be even");
  end

  logic [W:0]    xw;
  logic [P-1:0]  ty, te, t2, t4ss;
  logic [CW-1:0] n_ty, n_te, n_2, n_4ss;
  logic          odd_inv, even_inv;

  assign xw = {2'b00, x};

  for (genvar i = 0; i < P; i++) begin : g_pair
    ty_block #(.INV_HI(i % 2 == 0)) u_ty (.prev(y[i+1:i]), .cur(xw[i+1:i]), .ty(ty[i]));
    ty_block #(.INV_HI(i % 2 == 1)) u_te (.prev(y[i+1:i]), .cur(xw[i+1:i]), .ty(te[i]));
    t2_block                        u_t2 (.prev(y[i+1:i]), .cur(xw[i+1:i]), .t2(t2[i]));
    t4ss_block                      u_t4 (.prev(y[i+1:i]), .cur(xw[i+1:i]), .t4ss(t4ss[i]));
  end

  ones_counter #(.N(P)) u_cnt_ty (.bits_in(ty),   .count(n_ty));
  ones_counter #(.N(P)) u_cnt_te (.bits_in(te),   .count(n_te));
  ones_counter #(.N(P)) u_cnt_t2 (.bits_in(t2),   .count(n_2));
  ones_counter #(.N(P)) u_cnt_t4 (.bits_in(t4ss), .count(n_4ss));

  module_c #(.P(P)) u_module_c (
    .n_ty(n_ty), .n_te(n_te), .n_2(n_2), .n_4ss(n_4ss),
    .odd_inv(odd_inv), .even_inv(even_inv)
  );

  always_comb z = xw ^ (odd_inv ? ODD_MASK : '0) ^ (even_inv ? EVEN_MASK : '0);
endmodule
