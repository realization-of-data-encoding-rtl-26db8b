// T4** detector: flags a Type IV transition (no line switches) on a pair whose
// lines hold different values (01 -> 01 or 10 -> 10). Full inversion would turn
// exactly these pairs into Type II, so their count is what full inversion costs.
// The published encoders only name this "T4**" bank; reading it as these pairs
// is this design's interpretation.
// Combinational. prev/cur[0] is line i, prev/cur[1] is line i+1.
module t4ss_block (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       t4ss
);
  always_comb t4ss = (prev[0] ^ prev[1]) && (cur == prev);
endmodule
