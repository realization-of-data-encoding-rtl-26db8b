// Module A (scheme II decision) over all detector count combinations for 31
// line pairs. Relative to sending the flit as it is, odd inversion changes the
// coupling cost by P - 2*n_ty (every pair moves one step) and full inversion by
// 2*n_4ss - 2*n_2. The expected action is the cheapest, none before odd before
// full on ties, with full excluded when full_ok is low.
module tb_module_a;
  localparam int P = 31;
  logic [4:0] n_ty, n_2, n_4ss;
  logic       full_ok, half_inv, full_inv;
  int checks = 0, failures = 0;
  int seen_odd = 0, seen_full = 0, seen_none = 0;

  module_a dut (.n_ty(n_ty), .n_2(n_2), .n_4ss(n_4ss), .full_ok(full_ok),
                .half_inv(half_inv), .full_inv(full_inv));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t <= P; t++)
      for (int a = 0; a <= P; a++)
        for (int b = 0; a + b <= P; b++)
          for (int ok = 0; ok < 2; ok++) begin
            int cost_none, cost_odd, cost_full;
            bit exp_half, exp_full;
            n_ty = 5'(t); n_2 = 5'(a); n_4ss = 5'(b); full_ok = ok[0];
            #1;
            cost_none = 0;
            cost_odd  = P - 2 * t;
            cost_full = 2 * b - 2 * a;
            exp_half = 0; exp_full = 0;
            if (ok != 0 && cost_full < cost_none && cost_full < cost_odd) exp_full = 1;
            else if (cost_odd < cost_none)                           exp_half = 1;
            checks++;
            if (half_inv !== exp_half || full_inv !== exp_full) begin
              failures++;
              if (failures < 10)
                $display("FAIL ty=%0d t2=%0d t4=%0d ok=%0d -> half=%b full=%b", t, a, b, ok, half_inv, full_inv);
            end
            if (exp_full) seen_full++; else if (exp_half) seen_odd++; else seen_none++;
          end
    checks++;
    if (seen_full == 0 || seen_odd == 0 || seen_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
