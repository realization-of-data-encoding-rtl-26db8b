// Scheme III body-flit decoder. The two flag lines name the action directly:
// line W-1 set means the odd-numbered lines were inverted, line W set means the
// even-numbered ones were (both: full inversion). The decoder inverts the same
// lines back; with two flag lines no comparison with the previous flit is
// needed. Combinational. z is the (W+1)-line received value, x the body flit.
module decoder_s3 #(
  parameter int W = 32  // body flit is W-1 bits, link is W+1 lines; W must be even
) (
  input  logic [W:0]   z,
  output logic [W-2:0] x
);
  localparam logic [W:0] ODD_MASK  = (W + 1)'({(W / 2){2'b10}});
  localparam logic [W:0] EVEN_MASK = ~ODD_MASK;

  if (W % 2 != 0) begin : g_bad_width
    $error("decoder_s3: W must be even");
  end

  always_comb x = z[W-2:0] ^ (z[W-1] ? ODD_MASK[W-2:0] : '0) ^ (z[W] ? EVEN_MASK[W-2:0] : '0);
endmodule
