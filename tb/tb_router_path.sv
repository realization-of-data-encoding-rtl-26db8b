// Behavioural model of the router path between two network interfaces, for
// simulation only. The routers forward flits unchanged and in order; this model
// is an elastic queue of DEPTH flits that holds every flit for at least HOPS
// cycles and, to imitate contention, releases the head flit only on random
// cycles (probability STALL_PCT percent of a stall). A flit offered on the
// output stays valid and unchanged until taken. Valid/ready on both sides.
module tb_router_path
  import noc_codec_pkg::*;
#(
  parameter int LW        = 33,
  parameter int HOPS      = 3,
  parameter int DEPTH     = 4,
  parameter int STALL_PCT = 30
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  flit_type_e    in_type,
  input  logic [LW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output flit_type_e    out_type,
  output logic [LW-1:0] out_data
);
  typedef struct {
    flit_type_e    typ;
    logic [LW-1:0] data;
    longint        due;
  } entry_t;

  entry_t q [$];
  longint now = 0;

  always @(posedge clk) begin
    now++;
    if (!rst_n) begin
      q.delete();
      in_ready  <= 1'b0;
      out_valid <= 1'b0;
      out_type  <= FLIT_HEAD;
      out_data  <= '0;
    end else begin
      logic taken;
      taken = out_valid && out_ready;
      if (taken) void'(q.pop_front());
      if (in_valid && in_ready) begin
        entry_t e;
        e.typ = in_type;
        e.data = in_data;
        e.due = now + longint'(HOPS);
        q.push_back(e);
      end
      if (out_valid && !taken) begin
        // hold the offered flit
      end else if (q.size() != 0 && q[0].due <= now && $urandom_range(0, 99) >= STALL_PCT) begin
        out_valid <= 1'b1;
        out_type  <= q[0].typ;
        out_data  <= q[0].data;
      end else begin
        out_valid <= 1'b0;
      end
      in_ready <= q.size() < DEPTH;
    end
  end
endmodule
