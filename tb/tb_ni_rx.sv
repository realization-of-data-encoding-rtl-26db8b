// Receiving network interface, one instance per scheme (I, II, III) at W = 32.
// The link side is driven with packets encoded by the brute-force reference
// encoder (chained on the previous link value, headers sent raw), with random
// gaps; the processing-element side applies random back-pressure. Every
// delivered flit must equal the original, a flit accepted in cycle t must be
// offered in cycle t+1, and a first phase without gaps or back-pressure must
// run at one flit per cycle. Headers, every action of each scheme and stalls
// are counted and must each occur.
module tb_ni_rx;
  import noc_codec_pkg::*;
  import tb_codec_ref_pkg::*;
  localparam int W      = 32;
  localparam int NFLITS = 3000;
  localparam int BURST  = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 1; s <= 3; s++) begin : g_scheme
    localparam int LW = link_width(s, W);
    logic          link_valid, link_ready, pe_valid, pe_ready;
    flit_type_e    link_type, pe_type;
    logic [LW-1:0] link_data;
    logic [W-2:0]  pe_data;

    ni_rx #(.W(W), .SCHEME(s)) dut (
      .clk, .rst_n,
      .link_valid, .link_ready, .link_type, .link_data,
      .pe_valid, .pe_ready, .pe_type, .pe_data
    );

    logic [63:0]  link_q [$];   // offered on the link, not yet accepted
    flit_type_e   ltyp_q [$];
    logic [63:0]  exp_q [$];    // accepted, not yet delivered
    flit_type_e   typ_q [$];
    logic [63:0]  link_prev = '0;
    logic         just_accepted = 1'b0, taken_q = 1'b0;
    logic [63:0]  last_exp;
    int           seen [4] = '{0, 0, 0, 0};
    int           n_head = 0, n_stall = 0, n_acc = 0, n_out = 0, cycle = 0;
    int           body_left = -1;

    always @(posedge clk) taken_q <= link_valid && link_ready;

    initial begin
      link_valid = 1'b0; link_type = FLIT_HEAD; link_data = '0; pe_ready = 1'b0;
      wait (rst_n);
      while (n_acc < NFLITS) begin
        @(negedge clk);
        pe_ready = (n_acc < BURST) || ($urandom_range(0, 3) != 0);
        if (!link_valid || taken_q) begin
          if (n_acc < BURST || $urandom_range(0, 4) != 0) begin
            logic [63:0] xv, zv;
            int act;
            xv = gen_flit(W, link_prev);
            if (body_left < 0) begin
              link_type = FLIT_HEAD; body_left = $urandom_range(0, 6);
              zv = xv;
            end else begin
              link_type = (body_left == 0) ? FLIT_TAIL : FLIT_BODY;
              body_left--;
              if (link_type == FLIT_TAIL) body_left = -1;
              act = ref_action(s, W, xv, link_prev);
              seen[act]++;
              zv = apply_action(s, W, xv, act);
            end
            link_valid = 1'b1;
            link_data  = LW'(zv);
            link_prev  = zv;
            link_q.push_back(xv);
            ltyp_q.push_back(link_type);
          end else begin
            link_valid = 1'b0;
          end
        end
      end
      while (link_valid) begin
        @(negedge clk);
        pe_ready = 1'b1;
        if (taken_q) link_valid = 1'b0;
      end
      repeat (5) @(negedge clk);
      done_cnt++;
    end

    always @(posedge clk) if (rst_n) begin
      cycle++;
      if (just_accepted) begin
        checks++;
        if (!(pe_valid && 64'(pe_data) == last_exp)) begin
          failures++;
          $display("FAIL s%0d latency: pe_valid=%b data=%h", s, pe_valid, pe_data);
        end
      end
      just_accepted = 1'b0;
      if (pe_valid && !pe_ready) n_stall++;
      if (pe_valid && pe_ready) begin
        checks++;
        n_out++;
        if (exp_q.size() == 0 || 64'(pe_data) != exp_q[0] || pe_type != typ_q[0]) begin
          failures++;
          $display("FAIL s%0d flit %h type %0d", s, pe_data, pe_type);
        end
        if (exp_q.size() != 0) begin
          void'(exp_q.pop_front());
          void'(typ_q.pop_front());
        end
      end
      if (link_valid && link_ready) begin
        if (link_type == FLIT_HEAD) n_head++;
        last_exp = link_q.pop_front();
        exp_q.push_back(last_exp);
        typ_q.push_back(ltyp_q.pop_front());
        just_accepted = 1'b1;
        n_acc++;
        if (n_acc == BURST) begin
          checks++;
          if (cycle != BURST + 1) begin
            failures++;
            $display("FAIL s%0d: %0d flits took %0d cycles", s, BURST, cycle - 1);
          end
        end
      end
    end

    final begin
      $display("scheme %0d: heads=%0d none=%0d odd=%0d even=%0d full=%0d stalls=%0d out=%0d",
               s, n_head, seen[0], seen[1], seen[2], seen[3], n_stall, n_out);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_cnt == 3);
    checks += 4;
    if (g_scheme[1].n_head == 0 || g_scheme[2].n_head == 0 || g_scheme[3].n_head == 0) failures++;
    if (g_scheme[1].n_out != g_scheme[1].n_acc || g_scheme[1].seen[ACT_ODD] == 0 || g_scheme[1].seen[ACT_NONE] == 0 || g_scheme[1].n_stall == 0) failures++;
    if (g_scheme[2].n_out != g_scheme[2].n_acc || g_scheme[2].seen[ACT_ODD] == 0 || g_scheme[2].seen[ACT_FULL] == 0 || g_scheme[2].n_stall == 0) failures++;
    if (g_scheme[3].n_out != g_scheme[3].n_acc || g_scheme[3].seen[ACT_EVEN] == 0 || g_scheme[3].seen[ACT_FULL] == 0 || g_scheme[3].n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
