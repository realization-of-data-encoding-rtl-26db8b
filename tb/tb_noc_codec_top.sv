// End-to-end test of the whole design at its default parameters (W = 32).
// Each of the three channels (scheme I, II, III) carries packets - one header,
// 0-6 body flits, one tail - from a source model with random gaps, through its
// sending interface, a behavioural router path with random stalls, and its
// receiving interface, to a sink with random back-pressure. Checked per channel:
//   - every flit arrives in order, with its type and its original payload;
//   - every link value is the brute-force reference encoding of the flit against
//     the previous link value (headers raw, inversion lines 0);
//   - the inversion applied is one the scheme allows (read from the link);
//   - over the run the encoded link has fewer coupling transitions than the
//     same flits sent raw.
// Counted, and each required at least once: headers, no inversion, odd, even
// (scheme III) and full inversion (schemes II and III), stalls at the source,
// on the link and at the sink.
module tb_noc_codec_top;
  import noc_codec_pkg::*;
  import tb_codec_ref_pkg::*;
  localparam int W      = 32;
  localparam int NFLITS = 5000;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  always #5 clk = ~clk;

  // per-channel signals, index = scheme; link vectors sized for the widest link
  logic         src_valid [1:3], src_ready [1:3], dst_valid [1:3], dst_ready [1:3];
  flit_type_e   src_type  [1:3], dst_type  [1:3];
  logic [W-2:0] src_data  [1:3], dst_data  [1:3];
  logic         out_valid [1:3], out_ready [1:3], in_valid [1:3], in_ready [1:3];
  flit_type_e   out_type  [1:3], in_type   [1:3];
  logic [W:0]   out_data  [1:3], in_data   [1:3];

  noc_codec_top dut (
    .clk, .rst_n,
    .s1_src_valid(src_valid[1]), .s1_src_ready(src_ready[1]), .s1_src_type(src_type[1]), .s1_src_data(src_data[1]),
    .s1_out_valid(out_valid[1]), .s1_out_ready(out_ready[1]), .s1_out_type(out_type[1]), .s1_out_data(out_data[1][W-1:0]),
    .s1_in_valid(in_valid[1]),   .s1_in_ready(in_ready[1]),   .s1_in_type(in_type[1]),   .s1_in_data(in_data[1][W-1:0]),
    .s1_dst_valid(dst_valid[1]), .s1_dst_ready(dst_ready[1]), .s1_dst_type(dst_type[1]), .s1_dst_data(dst_data[1]),
    .s2_src_valid(src_valid[2]), .s2_src_ready(src_ready[2]), .s2_src_type(src_type[2]), .s2_src_data(src_data[2]),
    .s2_out_valid(out_valid[2]), .s2_out_ready(out_ready[2]), .s2_out_type(out_type[2]), .s2_out_data(out_data[2][W-1:0]),
    .s2_in_valid(in_valid[2]),   .s2_in_ready(in_ready[2]),   .s2_in_type(in_type[2]),   .s2_in_data(in_data[2][W-1:0]),
    .s2_dst_valid(dst_valid[2]), .s2_dst_ready(dst_ready[2]), .s2_dst_type(dst_type[2]), .s2_dst_data(dst_data[2]),
    .s3_src_valid(src_valid[3]), .s3_src_ready(src_ready[3]), .s3_src_type(src_type[3]), .s3_src_data(src_data[3]),
    .s3_out_valid(out_valid[3]), .s3_out_ready(out_ready[3]), .s3_out_type(out_type[3]), .s3_out_data(out_data[3]),
    .s3_in_valid(in_valid[3]),   .s3_in_ready(in_ready[3]),   .s3_in_type(in_type[3]),   .s3_in_data(in_data[3]),
    .s3_dst_valid(dst_valid[3]), .s3_dst_ready(dst_ready[3]), .s3_dst_type(dst_type[3]), .s3_dst_data(dst_data[3])
  );

  assign out_data[1][W] = 1'b0;
  assign out_data[2][W] = 1'b0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 1; s <= 3; s++) begin : g_ch
    localparam int LW = link_width(s, W);

    tb_router_path #(.LW(W + 1), .HOPS(2 + s), .DEPTH(4), .STALL_PCT(25)) u_path (
      .clk, .rst_n,
      .in_valid(out_valid[s]), .in_ready(out_ready[s]), .in_type(out_type[s]), .in_data(out_data[s]),
      .out_valid(in_valid[s]), .out_ready(in_ready[s]), .out_type(in_type[s]), .out_data(in_data[s])
    );

    logic [63:0] sent_q [$];   // accepted at the source, not yet seen on the link
    flit_type_e  sent_t [$];
    logic [63:0] exp_q  [$];   // seen on the link, not yet delivered
    flit_type_e  exp_t  [$];
    logic [63:0] link_prev = '0, raw_prev = '0;
    longint      cost_raw = 0, cost_enc = 0;
    int          seen [4] = '{0, 0, 0, 0};
    int          n_head = 0, n_src = 0, n_dst = 0, n_link = 0;
    int          st_src = 0, st_link = 0, st_dst = 0;
    int          body_left = -1;
    logic        taken_q = 1'b0;

    always @(posedge clk) taken_q <= src_valid[s] && src_ready[s];

    // source processing element
    initial begin
      src_valid[s] = 1'b0; src_type[s] = FLIT_HEAD; src_data[s] = '0; dst_ready[s] = 1'b0;
      wait (rst_n);
      while (n_src < NFLITS) begin
        @(negedge clk);
        dst_ready[s] = ($urandom_range(0, 4) != 0);
        if (!src_valid[s] || taken_q) begin
          if ($urandom_range(0, 5) != 0) begin
            logic [63:0] xv;
            xv = gen_flit(W, link_prev);
            if (body_left < 0) begin
              src_type[s] = FLIT_HEAD; body_left = $urandom_range(0, 6);
            end else if (body_left == 0) begin
              src_type[s] = FLIT_TAIL; body_left = -1;
            end else begin
              src_type[s] = FLIT_BODY; body_left--;
            end
            src_valid[s] = 1'b1;
            src_data[s]  = xv[W-2:0];
          end else begin
            src_valid[s] = 1'b0;
          end
        end
      end
      while (src_valid[s]) begin
        @(negedge clk);
        if (taken_q) src_valid[s] = 1'b0;
      end
      dst_ready[s] = 1'b1;
      wait (n_dst == n_src);
      repeat (5) @(negedge clk);
      done_cnt++;
    end

    // scoreboard on the pre-edge values
    always @(posedge clk) if (rst_n) begin
      if (src_valid[s] && !src_ready[s]) st_src++;
      if (out_valid[s] && !out_ready[s]) st_link++;
      if (dst_valid[s] && !dst_ready[s]) st_dst++;

      if (dst_valid[s] && dst_ready[s]) begin
        checks++;
        n_dst++;
        if (exp_q.size() == 0 || 64'(dst_data[s]) != exp_q[0] || dst_type[s] != exp_t[0]) begin
          failures++;
          if (failures < 10) $display("FAIL s%0d delivered %h type %0d", s, dst_data[s], dst_type[s]);
        end
        if (exp_q.size() != 0) begin
          void'(exp_q.pop_front());
          void'(exp_t.pop_front());
        end
      end

      if (out_valid[s] && out_ready[s]) begin
        logic [63:0] xv, zv, diff, ref_z;
        flit_type_e  t;
        int          act;
        n_link++;
        xv = sent_q.pop_front();
        t  = sent_t.pop_front();
        zv = 64'(out_data[s][LW-1:0]);
        diff = zv ^ xv;
        if (t == FLIT_HEAD) begin
          n_head++;
          ref_z = xv;
        end else begin
          ref_z = ref_encode(s, W, xv, link_prev);
          act = (diff == 0)                     ? ACT_NONE :
                (diff == lane_mask(LW, 1'b1))   ? ACT_ODD  :
                (diff == lane_mask(LW, 1'b0))   ? ACT_EVEN :
                (diff == (lane_mask(LW, 1'b1) | lane_mask(LW, 1'b0))) ? ACT_FULL : -1;
          checks++;
          if (act < 0 || (s == 1 && act > ACT_ODD) || (s == 2 && act == ACT_EVEN)) begin
            failures++;
            $display("FAIL s%0d: inversion pattern %h not allowed", s, diff);
          end else seen[act]++;
        end
        checks++;
        if (zv != ref_z) begin
          failures++;
          if (failures < 10) $display("FAIL s%0d link %h expected %h", s, zv, ref_z);
        end
        cost_enc += longint'(link_cost(link_prev, zv, LW));
        cost_raw += longint'(link_cost(raw_prev, xv, LW));
        link_prev = zv;
        raw_prev  = xv;
        exp_q.push_back(xv);
        exp_t.push_back(t);
      end

      if (src_valid[s] && src_ready[s]) begin
        n_src++;
        sent_q.push_back(64'(src_data[s]));
        sent_t.push_back(src_type[s]);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cnt == 3);
    for (int s = 1; s <= 3; s++) begin
      int sn, sl, sd, h, c[4], nd, ns;
      longint cr, ce;
      case (s)
        1: begin sn = g_ch[1].st_src; sl = g_ch[1].st_link; sd = g_ch[1].st_dst; h = g_ch[1].n_head;
                 c = g_ch[1].seen; nd = g_ch[1].n_dst; ns = g_ch[1].n_src; cr = g_ch[1].cost_raw; ce = g_ch[1].cost_enc; end
        2: begin sn = g_ch[2].st_src; sl = g_ch[2].st_link; sd = g_ch[2].st_dst; h = g_ch[2].n_head;
                 c = g_ch[2].seen; nd = g_ch[2].n_dst; ns = g_ch[2].n_src; cr = g_ch[2].cost_raw; ce = g_ch[2].cost_enc; end
        default: begin sn = g_ch[3].st_src; sl = g_ch[3].st_link; sd = g_ch[3].st_dst; h = g_ch[3].n_head;
                 c = g_ch[3].seen; nd = g_ch[3].n_dst; ns = g_ch[3].n_src; cr = g_ch[3].cost_raw; ce = g_ch[3].cost_enc; end
      endcase
      $display("scheme %0d: flits=%0d heads=%0d none=%0d odd=%0d even=%0d full=%0d stalls src=%0d link=%0d dst=%0d coupling raw=%0d encoded=%0d (%0d%% saved)",
               s, nd, h, c[0], c[1], c[2], c[3], sn, sl, sd, cr, ce, (cr - ce) * 100 / cr);
      checks += 6;
      if (nd != ns || nd < NFLITS) failures++;
      if (h == 0) failures++;
      if (c[ACT_NONE] == 0 || c[ACT_ODD] == 0) failures++;
      if ((s >= 2 && c[ACT_FULL] == 0) || (s == 3 && c[ACT_EVEN] == 0)) failures++;
      if (sn == 0 || sl == 0 || sd == 0) failures++;
      if (ce >= cr) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
