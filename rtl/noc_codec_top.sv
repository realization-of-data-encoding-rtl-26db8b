// Coupling-aware flit coding at the network interfaces of a network on chip.
//
// The three published encoding schemes are alternatives for the same place in
// the network, so this top holds one source/destination interface pair per
// scheme side by side:
//   channel 1: scheme I   (odd inversion,                  W-line link)
//   channel 2: scheme II  (odd or full inversion,          W-line link)
//   channel 3: scheme III (odd, even or full inversion,    W+1-line link)
// Each channel's sending interface (ni_tx) takes flits from a source processing
// element and drives its link towards the first router; its receiving interface
// (ni_rx) takes flits from the last router and delivers decoded flits to the
// destination processing element. The routers in between are not part of this
// design - the coding needs no change in them - so each link's two ends are
// brought out as ports: connect them through any in-order router path that
// forwards the flit lines unchanged (or directly, for a point-to-point link).
//
// All handshakes are valid/ready; every interface adds one register stage.
// Clock and synchronous active-low reset are shared.
module noc_codec_top
  import noc_codec_pkg::*;
#(
  parameter int W = 32  // body flit is W-1 bits; must be even
) (
  input  logic         clk,
  input  logic         rst_n,

  // ---- channel 1, scheme I ----
  input  logic         s1_src_valid,
  output logic         s1_src_ready,
  input  flit_type_e   s1_src_type,
  input  logic [W-2:0] s1_src_data,
  output logic         s1_out_valid,
  input  logic         s1_out_ready,
  output flit_type_e   s1_out_type,
  output logic [W-1:0] s1_out_data,
  input  logic         s1_in_valid,
  output logic         s1_in_ready,
  input  flit_type_e   s1_in_type,
  input  logic [W-1:0] s1_in_data,
  output logic         s1_dst_valid,
  input  logic         s1_dst_ready,
  output flit_type_e   s1_dst_type,
  output logic [W-2:0] s1_dst_data,

  // ---- channel 2, scheme II ----
  input  logic         s2_src_valid,
  output logic         s2_src_ready,
  input  flit_type_e   s2_src_type,
  input  logic [W-2:0] s2_src_data,
  output logic         s2_out_valid,
  input  logic         s2_out_ready,
  output flit_type_e   s2_out_type,
  output logic [W-1:0] s2_out_data,
  input  logic         s2_in_valid,
  output logic         s2_in_ready,
  input  flit_type_e   s2_in_type,
  input  logic [W-1:0] s2_in_data,
  output logic         s2_dst_valid,
  input  logic         s2_dst_ready,
  output flit_type_e   s2_dst_type,
  output logic [W-2:0] s2_dst_data,

  // ---- channel 3, scheme III ----
  input  logic         s3_src_valid,
  output logic         s3_src_ready,
  input  flit_type_e   s3_src_type,
  input  logic [W-2:0] s3_src_data,
  output logic         s3_out_valid,
  input  logic         s3_out_ready,
  output flit_type_e   s3_out_type,
  output logic [W:0]   s3_out_data,
  input  logic         s3_in_valid,
  output logic         s3_in_ready,
  input  flit_type_e   s3_in_type,
  input  logic [W:0]   s3_in_data,
  output logic         s3_dst_valid,
  input  logic         s3_dst_ready,
  output flit_type_e   s3_dst_type,
  output logic [W-2:0] s3_dst_data
);

  ni_tx #(.W(W), .SCHEME(1)) u_s1_tx (
    .clk, .rst_n,
    .pe_valid(s1_src_valid), .pe_ready(s1_src_ready), .pe_type(s1_src_type), .pe_data(s1_src_data),
    .link_valid(s1_out_valid), .link_ready(s1_out_ready), .link_type(s1_out_type), .link_data(s1_out_data)
  );
  ni_rx #(.W(W), .SCHEME(1)) u_s1_rx (
    .clk, .rst_n,
    .link_valid(s1_in_valid), .link_ready(s1_in_ready), .link_type(s1_in_type), .link_data(s1_in_data),
    .pe_valid(s1_dst_valid), .pe_ready(s1_dst_ready), .pe_type(s1_dst_type), .pe_data(s1_dst_data)
  );

  ni_tx #(.W(W), .SCHEME(2)) u_s2_tx (
    .clk, .rst_n,
    .pe_valid(s2_src_valid), .pe_ready(s2_src_ready), .pe_type(s2_src_type), .pe_data(s2_src_data),
    .link_valid(s2_out_valid), .link_ready(s2_out_ready), .link_type(s2_out_type), .link_data(s2_out_data)
  );
  ni_rx #(.W(W), .SCHEME(2)) u_s2_rx (
    .clk, .rst_n,
    .link_valid(s2_in_valid), .link_ready(s2_in_ready), .link_type(s2_in_type), .link_data(s2_in_data),
    .pe_valid(s2_dst_valid), .pe_ready(s2_dst_ready), .pe_type(s2_dst_type), .pe_data(s2_dst_data)
  );

  ni_tx #(.W(W), .SCHEME(3)) u_s3_tx (
    .clk, .rst_n,
    .pe_valid(s3_src_valid), .pe_ready(s3_src_ready), .pe_type(s3_src_type), .pe_data(s3_src_data),
    .link_valid(s3_out_valid), .link_ready(s3_out_ready), .link_type(s3_out_type), .link_data(s3_out_data)
  );
  ni_rx #(.W(W), .SCHEME(3)) u_s3_rx (
    .clk, .rst_n,
    .link_valid(s3_in_valid), .link_ready(s3_in_ready), .link_type(s3_in_type), .link_data(s3_in_data),
    .pe_valid(s3_dst_valid), .pe_ready(s3_dst_ready), .pe_type(s3_dst_type), .pe_data(s3_dst_data)
  );
endmodule
