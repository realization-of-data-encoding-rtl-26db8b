// Uniform random data workload. 20000 random 31-bit body flits are sent
// back-to-back over one link per scheme (encoders and decoders at W = 32, the
// encoder fed with its own previous output, as on a real link). Checked:
//   - on the raw data lines the four coupling transition types occur with the
//     probabilities that follow for random data: Type I 1/2, Type II 1/8,
//     Type III 1/8, Type IV 1/4 (within one percentage point);
//   - every decoder restores every flit;
//   - every scheme lowers the total coupling cost of the link, and the schemes
//     with more inversion choices lower it at least as much (III <= II <= I).
// The coupling costs and the saving of each scheme are printed.
module tb_workload_random;
  import tb_codec_ref_pkg::*;
  localparam int W = 32;
  localparam int N = 20000;
  localparam longint NPAIRS = 64'(N) * 64'(W - 2);

  logic [W-2:0] x;
  logic [W-1:0] y1, z1, y2, z2;
  logic [W:0]   y3, z3;
  logic [W-2:0] d1, d2, d3;
  int checks = 0, failures = 0;

  encoder_s1 u_e1 (.x(x), .y(y1), .z(z1));
  encoder_s2 u_e2 (.x(x), .y(y2), .z(z2));
  encoder_s3 u_e3 (.x(x), .y(y3), .z(z3));
  decoder_s1 u_d1 (.z(z1), .x(d1));
  decoder_s2 u_d2 (.z(z2), .r(y2), .x(d2));
  decoder_s3 u_d3 (.z(z3), .x(d3));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-2:0] raw_prev;
    longint types [4];
    longint c_raw, c1, c2, c3, pairs;
    raw_prev = '0;
    types = '{0, 0, 0, 0};
    c_raw = 0; c1 = 0; c2 = 0; c3 = 0;
    y1 = '0; y2 = '0; y3 = '0;
    for (int i = 0; i < N; i++) begin
      x = (W - 1)'($urandom);
      #1;
      // transition types on the raw data lines
      for (int b = 0; b + 1 < W - 1; b++) begin
        bit sa, sb;
        sa = raw_prev[b] != x[b];
        sb = raw_prev[b+1] != x[b+1];
        if (sa != sb)                                  types[0]++;
        else if (sa && sb && raw_prev[b] != raw_prev[b+1]) types[1]++;
        else if (sa && sb)                             types[2]++;
        else                                           types[3]++;
      end
      c_raw += longint'(link_cost(64'(raw_prev), 64'(x), W));
      c1 += longint'(link_cost(64'(y1), 64'(z1), W));
      c2 += longint'(link_cost(64'(y2), 64'(z2), W));
      c3 += longint'(link_cost(64'(y3), 64'(z3), W + 1));
      checks += 3;
      if (d1 !== x) failures++;
      if (d2 !== x) failures++;
      if (d3 !== x) failures++;
      raw_prev = x;
      y1 = z1; y2 = z2; y3 = z3;
    end
    pairs = NPAIRS;
    $display("raw transition types: I %0d  II %0d  III %0d  IV %0d  of %0d pairs", types[0], types[1], types[2], types[3], pairs);
    checks += 4;
    if (types[0] * 100 < pairs * 49 || types[0] * 100 > pairs * 51) failures++;
    if (types[1] * 1000 < pairs * 115 || types[1] * 1000 > pairs * 135) failures++;
    if (types[2] * 1000 < pairs * 115 || types[2] * 1000 > pairs * 135) failures++;
    if (types[3] * 100 < pairs * 24 || types[3] * 100 > pairs * 26) failures++;
    $display("coupling cost raw %0d, scheme I %0d (%0d%% saved), scheme II %0d (%0d%%), scheme III %0d (%0d%%)",
             c_raw, c1, (c_raw - c1) * 100 / c_raw, c2, (c_raw - c2) * 100 / c_raw, c3, (c_raw - c3) * 100 / c_raw);
    checks += 3;
    if (c1 >= c_raw) failures++;
    if (c2 > c1) failures++;
    if (c3 > c2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
