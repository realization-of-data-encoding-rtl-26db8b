// Sending half of a network interface with a flit encoder (the "E" block).
//
// Flits from the processing element arrive with a valid/ready handshake. Header
// flits carry routing information that the routers must read, so they go onto
// the link unchanged with the inversion line(s) at 0. Body and tail flits pass
// through the scheme I, II or III encoder (parameter SCHEME), which compares the
// flit with the value the link lines hold now. The output register is both the
// link driver and the "previous encoded" register of the encoder: it keeps its
// value while the link is idle, because the wires do too. Encoding only header-
// exempt flits and keeping packets un-interleaved on a link (no virtual channels)
// follows the published scheme; the handshake, the flit-type sideband lines and
// the single output register are this design's own choices.
//
// Timing: a flit accepted in cycle t is on the link from cycle t+1; one flit per
// cycle while link_ready is high. Reset (synchronous, active low) clears the
// link value to all zeros, matching the receiver.
module ni_tx
  import noc_codec_pkg::*;
#(
  parameter int W      = 32,                       // body flit is W-1 bits
  parameter int SCHEME = 3,                        // 1, 2 or 3
  parameter int LW     = (SCHEME == 3) ? W + 1 : W // link lines
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the processing element
  input  logic          pe_valid,
  output logic          pe_ready,
  input  flit_type_e    pe_type,
  input  logic [W-2:0]  pe_data,
  // to the first router
  output logic          link_valid,
  input  logic          link_ready,
  output flit_type_e    link_type,
  output logic [LW-1:0] link_data
);
  logic [LW-1:0] encoded, next_value;

  if (SCHEME == 1) begin : g_s1
    encoder_s1 #(.W(W)) u_enc (.x(pe_data), .y(link_data), .z(encoded));
  end else if (SCHEME == 2) begin : g_s2
    encoder_s2 #(.W(W)) u_enc (.x(pe_data), .y(link_data), .z(encoded));
  end else if (SCHEME == 3) begin : g_s3
    encoder_s3 #(.W(W)) u_enc (.x(pe_data), .y(link_data), .z(encoded));
  end else begin : g_bad_scheme
    $error("ni_tx: SCHEME must be 1, 2 or 3");
  end

  always_comb begin
    pe_ready   = !link_valid || link_ready;
    next_value = (pe_type == FLIT_HEAD) ? LW'(pe_data) : encoded;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_valid <= 1'b0;
      link_type  <= FLIT_HEAD;
      link_data  <= '0;
    end else if (pe_ready) begin
      link_valid <= pe_valid;
      if (pe_valid) begin
        link_type <= pe_type;
        link_data <= next_value;
      end
    end
  end

  // A flit offered to the router stays unchanged until it is taken.
  a_link_hold : assert property (@(posedge clk) disable iff (!rst_n)
    link_valid && !link_ready |=> link_valid && $stable(link_data) && $stable(link_type));
endmodule
