// Scheme II decoder at its default width (W = 32): biased random body flits are
// encoded by the brute-force reference encoder against the previous link value
// (chained, as on a real link) and the decoder must return each original flit.
// Every action the scheme can take must occur at least once.
module tb_decoder_s2;
  import tb_codec_ref_pkg::*;
  localparam int W  = 32;
  localparam int LW = W;
  localparam int S  = 2;

  logic [LW-1:0] z, r;
  logic [W-2:0]  x;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  decoder_s2 dut (.z(z), .r(r), .x(x));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] xv;
    int act;
    r = '0;
    for (int i = 0; i < 4000; i++) begin
      xv  = gen_flit(W, 64'(r));
      act = ref_action(S, W, xv, 64'(r));
      seen[act]++;
      z   = LW'(apply_action(S, W, xv, act));
      #1;
      checks++;
      if (64'(x) !== xv) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d act=%0d z=%h r=%h x=%h expected %h", i, act, z, r, x, xv[W-2:0]);
      end
      r = (i % 4 == 3) ? LW'({$urandom, $urandom}) : z;
    end
    checks++;
    if (seen[ACT_NONE] == 0 || seen[ACT_ODD] == 0) failures++;
    if (S >= 2) begin checks++; if (seen[ACT_FULL] == 0) failures++; end
    if (S == 3) begin checks++; if (seen[ACT_EVEN] == 0) failures++; end
    $display("actions none=%0d odd=%0d even=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
