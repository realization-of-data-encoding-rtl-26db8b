// Receiving half of a network interface with a flit decoder (the "D" block).
//
// Flits arrive from the last router with a valid/ready handshake. Header flits
// are passed on unchanged (their inversion lines are 0); body and tail flits go
// through the scheme I, II or III decoder (parameter SCHEME). The scheme II
// decoder also needs the link value received just before the current flit,
// which is kept in a register updated on every accepted flit, headers included,
// so it always equals the sender's "previous encoded" value. The decoded flit is
// registered towards the processing element. Header exemption and decoding
// follow the published scheme; handshake, sideband flit type and register
// placement are this design's own choices.
//
// Timing: a flit accepted in cycle t is offered to the processing element from
// cycle t+1; one flit per cycle while pe_ready is high. Reset is synchronous,
// active low, and clears the previous-value register to all zeros.
module ni_rx
  import noc_codec_pkg::*;
#(
  parameter int W      = 32,
  parameter int SCHEME = 3,
  parameter int LW     = (SCHEME == 3) ? W + 1 : W
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the last router
  input  logic          link_valid,
  output logic          link_ready,
  input  flit_type_e    link_type,
  input  logic [LW-1:0] link_data,
  // to the processing element
  output logic          pe_valid,
  input  logic          pe_ready,
  output flit_type_e    pe_type,
  output logic [W-2:0]  pe_data
);
  logic [W-2:0]  decoded, next_data;

  if (SCHEME == 1) begin : g_s1
    decoder_s1 #(.W(W)) u_dec (.z(link_data), .x(decoded));
  end else if (SCHEME == 2) begin : g_s2
    // Link value received before the current flit; only scheme II needs it.
    logic [LW-1:0] prev_rx;
    always_ff @(posedge clk) begin
      if (!rst_n)                        prev_rx <= '0;
      else if (link_ready && link_valid) prev_rx <= link_data;
    end
    decoder_s2 #(.W(W)) u_dec (.z(link_data), .r(prev_rx), .x(decoded));
  end else if (SCHEME == 3) begin : g_s3
    decoder_s3 #(.W(W)) u_dec (.z(link_data), .x(decoded));
  end else begin : g_bad_scheme
    $error("ni_rx: SCHEME must be 1, 2 or 3");
  end

  always_comb begin
    link_ready = !pe_valid || pe_ready;
    next_data  = (link_type == FLIT_HEAD) ? link_data[W-2:0] : decoded;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pe_valid <= 1'b0;
      pe_type  <= FLIT_HEAD;
      pe_data  <= '0;
    end else if (link_ready) begin
      pe_valid <= link_valid;
      if (link_valid) begin
        pe_type <= link_type;
        pe_data <= next_data;
      end
    end
  end

  a_pe_hold : assert property (@(posedge clk) disable iff (!rst_n)
    pe_valid && !pe_ready |=> pe_valid && $stable(pe_data) && $stable(pe_type));
endmodule
