// Ty / Te detector: one adjacent line pair, decides whether inverting one line
// of the pair lowers the pair's coupling cost.
//
// In odd inversion every odd-numbered line is inverted; in even inversion every
// even-numbered line. Either way each adjacent pair has exactly one inverted
// line, and flipping one line always moves the pair's coupling cost by exactly
// one step (Type I <-> Type II/III/IV). The detector output is 1 when that step
// is downward. Instantiated with the upper line of the pair inverted it is the
// "Ty" block of the odd-inverting encoders; with the lower line inverted it is
// the "Te" block of the even-inverting encoder. Which transitions it flags
// follows the odd/even inversion tables of the published scheme (Type II and
// the Type I subcases that become Type III or IV); the cost comparison is this
// implementation's way of writing that table.
//
// Interface: prev/cur[0] is line i, prev/cur[1] is line i+1. Purely combinational.
module ty_block
  import noc_codec_pkg::*;
#(
  parameter bit INV_HI = 1'b1  // 1: line i+1 is the inverted one, 0: line i
) (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       ty
);
  localparam logic [1:0] FLIP = INV_HI ? 2'b10 : 2'b01;

  always_comb ty = pair_cost(prev, cur) > pair_cost(prev, cur ^ FLIP);
endmodule
