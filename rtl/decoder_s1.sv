// Scheme I body-flit decoder. Line W-1 of the received link value is the
// inversion flag; when it is 1 the sender inverted every odd-numbered line, so
// the same lines are inverted back and lines 0..W-2 are the original body flit.
// Scheme I has only one inverting action, so unlike the scheme II decoder no
// comparison with the previously received flit is needed. Combinational.
module decoder_s1 #(
  parameter int W = 32  // link lines, flag line included; must be even
) (
  input  logic [W-1:0] z,
  output logic [W-2:0] x
);
  localparam logic [W-1:0] ODD_MASK = {(W / 2){2'b10}};

  if (W % 2 != 0) begin : g_bad_width
    $error("decoder_s1: W must be even");
  end

  always_comb x = z[W-2:0] ^ (z[W-1] ? ODD_MASK[W-2:0] : '0);
endmodule
