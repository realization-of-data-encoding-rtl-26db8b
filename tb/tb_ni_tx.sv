// Sending network interface, one instance per scheme (I, II, III) at W = 32.
// Each instance gets packets (one header, 0-6 body flits, one tail) with random
// gaps, while its link sees random back-pressure. A scoreboard predicts every
// link value: headers unchanged with the inversion lines at 0, body and tail
// flits encoded by the brute-force reference against the previous link value.
// Also checked: a flit accepted in cycle t is on the link in cycle t+1, and in a
// first phase without gaps or back-pressure one flit is accepted every cycle.
// Header pass-through, every action of each scheme and link stalls are counted
// and must each happen.
module tb_ni_tx;
  import noc_codec_pkg::*;
  import tb_codec_ref_pkg::*;
  localparam int W       = 32;
  localparam int NFLITS  = 3000;
  localparam int BURST   = 200;

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
    logic          pe_valid, pe_ready, link_valid, link_ready;
    flit_type_e    pe_type, link_type;
    logic [W-2:0]  pe_data;
    logic [LW-1:0] link_data;

    ni_tx #(.W(W), .SCHEME(s)) dut (
      .clk, .rst_n,
      .pe_valid, .pe_ready, .pe_type, .pe_data,
      .link_valid, .link_ready, .link_type, .link_data
    );

    logic [63:0]  exp_q [$];
    flit_type_e   typ_q [$];
    logic [63:0]  exp_prev = '0;
    logic         just_accepted = 1'b0;
    logic [63:0]  last_exp;
    int           seen [4] = '{0, 0, 0, 0};
    int           n_head = 0, n_stall = 0, n_acc = 0, n_out = 0, cycle = 0;
    int           body_left = 0;
    logic         pe_ready_q = 1'b0;

    // stimulus, changed on the falling edge
    initial begin
      pe_valid = 1'b0; pe_type = FLIT_HEAD; pe_data = '0; link_ready = 1'b0;
      wait (rst_n);
      while (n_acc < NFLITS) begin
        @(negedge clk);
        if (n_acc < BURST) link_ready = 1'b1;
        else               link_ready = ($urandom_range(0, 3) != 0);
        if (!pe_valid || pe_ready_q) begin
          if (n_acc < BURST || $urandom_range(0, 4) != 0) begin
            logic [63:0] xv;
            pe_valid = 1'b1;
            xv       = gen_flit(W, exp_prev);
            pe_data  = xv[W-2:0];
            if (body_left < 0) begin
              pe_type = FLIT_HEAD; body_left = $urandom_range(0, 6);
            end else if (body_left == 0) begin
              pe_type = FLIT_TAIL; body_left = -1;
            end else begin
              pe_type = FLIT_BODY; body_left--;
            end
          end else begin
            pe_valid = 1'b0;
          end
        end
      end
      @(negedge clk);
      pe_valid = 1'b0;
      link_ready = 1'b1;
      repeat (5) @(negedge clk);
      done_cnt++;
    end

    // handshake seen at the previous rising edge by the stimulus
    always @(posedge clk) pe_ready_q <= pe_valid && pe_ready;

    initial body_left = -1;

    // scoreboard, sampling the values just before each rising edge
    always @(posedge clk) if (rst_n) begin
      cycle++;
      if (just_accepted) begin
        checks++;
        if (!(link_valid && 64'(link_data) == last_exp)) begin
          failures++;
          $display("FAIL s%0d latency: link_valid=%b data=%h expected %h", s, link_valid, link_data, last_exp[LW-1:0]);
        end
      end
      just_accepted = 1'b0;
      if (link_valid && !link_ready) n_stall++;
      if (link_valid && link_ready) begin
        checks++;
        n_out++;
        if (exp_q.size() == 0 || 64'(link_data) != exp_q[0] || link_type != typ_q[0]) begin
          failures++;
          $display("FAIL s%0d link flit %h type %0d", s, link_data, link_type);
        end
        if (exp_q.size() != 0) begin
          void'(exp_q.pop_front());
          void'(typ_q.pop_front());
        end
      end
      if (pe_valid && pe_ready) begin
        logic [63:0] xv, e;
        xv = 64'(pe_data);
        if (pe_type == FLIT_HEAD) begin
          e = xv;
          n_head++;
        end else begin
          int act;
          act = ref_action(s, W, xv, exp_prev);
          seen[act]++;
          e = apply_action(s, W, xv, act);
        end
        exp_q.push_back(e);
        typ_q.push_back(pe_type);
        exp_prev = e;
        last_exp = e;
        just_accepted = 1'b1;
        n_acc++;
        // full rate while neither side holds back
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

  // one rising edge of reset, then run until all three schemes are done
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
