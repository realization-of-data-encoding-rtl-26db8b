// Reference model used by the testbenches: link coupling cost and a brute-force
// encoder. It is deliberately written differently from the RTL: instead of
// per-pair detectors and counts it builds every candidate link value, sums the
// coupling cost of the whole link for each one and keeps the cheapest, in the
// preference order none, odd, even, full (a later candidate must be strictly
// cheaper). Link values are held in 64-bit vectors with an explicit width.
package tb_codec_ref_pkg;

  // Coupling cost of a whole lw-line link going from prev to cur:
  // Type I = 1, Type II = 2, Types III and IV = 0, summed over adjacent pairs.
  function automatic int link_cost(input logic [63:0] prev, input logic [63:0] cur, input int lw);
    int c = 0;
    for (int i = 0; i + 1 < lw; i++) begin
      bit a_sw = prev[i] != cur[i];
      bit b_sw = prev[i+1] != cur[i+1];
      if (a_sw != b_sw) c += 1;
      else if (a_sw && b_sw && prev[i] != prev[i+1]) c += 2;
    end
    return c;
  endfunction

  function automatic logic [63:0] lane_mask(input int lw, input bit odd_lanes);
    logic [63:0] m = '0;
    for (int i = 0; i < lw; i++) if ((i % 2 == 1) == odd_lanes) m[i] = 1'b1;
    return m;
  endfunction

  function automatic int link_width(input int scheme, input int w);
    return (scheme == 3) ? w + 1 : w;
  endfunction

  // Action codes used by the testbenches' statistics.
  localparam int ACT_NONE = 0, ACT_ODD = 1, ACT_EVEN = 2, ACT_FULL = 3;

  // Brute-force choice of action for a body flit x (w-1 bits) given the link's
  // current value y.
  function automatic int ref_action(input int scheme, input int w,
                                    input logic [63:0] x, input logic [63:0] y);
    int          lw    = link_width(scheme, w);
    logic [63:0] odd   = lane_mask(lw, 1'b1);
    logic [63:0] even  = lane_mask(lw, 1'b0);
    logic [63:0] full  = odd | even;
    int          best  = ACT_NONE;
    int          bcost = link_cost(y, x, lw);
    if (link_cost(y, x ^ odd, lw) < bcost) begin
      best = ACT_ODD; bcost = link_cost(y, x ^ odd, lw);
    end
    if (scheme == 3 && link_cost(y, x ^ even, lw) < bcost) begin
      best = ACT_EVEN; bcost = link_cost(y, x ^ even, lw);
    end
    if (scheme >= 2 && link_cost(y, x ^ full, lw) < bcost) begin
      // With one flag line (scheme II) full inversion must be recognisable at the
      // receiver: odd inversion of the sent value would have to lower the cost.
      if (scheme == 3 || link_cost(y, x ^ full ^ odd, lw) < link_cost(y, x ^ full, lw)) begin
        best = ACT_FULL; bcost = link_cost(y, x ^ full, lw);
      end
    end
    return best;
  endfunction

  function automatic logic [63:0] apply_action(input int scheme, input int w,
                                               input logic [63:0] x, input int act);
    int lw = link_width(scheme, w);
    case (act)
      ACT_ODD:  return x ^ lane_mask(lw, 1'b1);
      ACT_EVEN: return x ^ lane_mask(lw, 1'b0);
      ACT_FULL: return x ^ lane_mask(lw, 1'b1) ^ lane_mask(lw, 1'b0);
      default:  return x;
    endcase
  endfunction

  function automatic logic [63:0] ref_encode(input int scheme, input int w,
                                             input logic [63:0] x, input logic [63:0] y);
    return apply_action(scheme, w, x, ref_action(scheme, w, x, y));
  endfunction

  // Random w-1 bit body flit, biased towards patterns that make every action
  // worthwhile: plain random, near copies of y, near complements of y, and y
  // with its odd or even lanes flipped.
  function automatic logic [63:0] gen_flit(input int w, input logic [63:0] y);
    logic [63:0] r     = {$urandom, $urandom};
    logic [63:0] noise = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
    logic [63:0] f;
    case ($urandom_range(0, 4))
      0: f = r;
      1: f = y ^ noise;
      2: f = ~y ^ noise;
      3: f = y ^ lane_mask(64, 1'b1) ^ noise;
      default: f = y ^ lane_mask(64, 1'b0) ^ noise;
    endcase
    return f & ((64'd1 << (w - 1)) - 64'd1);
  endfunction

endpackage
