// T2 detector: flags a Type II coupling transition on one adjacent line pair,
// i.e. both lines switch in opposite directions (01 -> 10 or 10 -> 01). Full
// inversion of the flit turns such a pair into Type IV (no switching), so the
// number of flagged pairs is what full inversion can save. The T2 bank is part
// of the published scheme II and III encoders; its gate-level form is this
// design's. Combinational.
// prev/cur[0] is line i, prev/cur[1] is line i+1.
module t2_block (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       t2
);
  always_comb t2 = (prev[0] ^ prev[1]) && (cur == ~prev);
endmodule
