// Scheme III encoder at its default width (W = 32): a chain of biased random
// body flits, each encoded against the previous encoder output, is compared
// with a brute-force reference that builds every candidate link value and
// keeps the one with the lowest summed coupling cost. The run must see no
// inversion and odd, even and full inversion at least once; the summed coupling cost of the
// raw and the encoded flit chain is printed for information.
module tb_encoder_s3;
  import tb_codec_ref_pkg::*;
  localparam int W  = 32;
  localparam int LW = W + 1;
  localparam int S  = 3;

  logic [W-2:0]  x;
  logic [LW-1:0] y, z;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  longint cost_raw = 0, cost_enc = 0;

  encoder_s3 dut (.x(x), .y(y), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] raw_prev, xv, exp_z;
    int act;
    raw_prev = '0;
    y = '0;
    for (int i = 0; i < 4000; i++) begin
      xv = gen_flit(W, 64'(y));
      x  = xv[W-2:0];
      #1;
      act   = ref_action(S, W, xv, 64'(y));
      exp_z = apply_action(S, W, xv, act);
      seen[act]++;
      checks++;
      if (64'(z) !== exp_z) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d x=%h y=%h z=%h expected %h", i, x, y, z, exp_z[LW-1:0]);
      end
      cost_raw += longint'(link_cost(raw_prev, xv, LW));
      cost_enc += longint'(link_cost(64'(y), 64'(z), LW));
      raw_prev = xv;
      // every fourth flit starts from an unrelated link value
      y = (i % 4 == 3) ? LW'({$urandom, $urandom}) : z;
    end
    checks++;
    if (seen[ACT_NONE] == 0 || seen[ACT_ODD] == 0) failures++;
    if (S >= 2) begin checks++; if (seen[ACT_FULL] == 0) failures++; end
    if (S == 3) begin checks++; if (seen[ACT_EVEN] == 0) failures++; end
    $display("actions none=%0d odd=%0d even=%0d full=%0d coupling raw=%0d encoded=%0d",
             seen[0], seen[1], seen[2], seen[3], cost_raw, cost_enc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
