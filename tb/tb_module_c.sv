// Module C (scheme III decision) for 32 line pairs: random count combinations
// plus hand-picked ties. Relative to sending the flit unchanged, odd and even
// inversion change the coupling cost by P - 2*n_ty and P - 2*n_te, full inversion
// by 2*n_4ss - 2*n_2. Expected: the cheapest action, ties resolved in the order
// none, odd, even, full, coded {odd_inv, even_inv}.
module tb_module_c;
  localparam int P = 32;
  logic [5:0] n_ty, n_te, n_2, n_4ss;
  logic       odd_inv, even_inv;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  module_c dut (.n_ty(n_ty), .n_te(n_te), .n_2(n_2), .n_4ss(n_4ss),
                .odd_inv(odd_inv), .even_inv(even_inv));

  task automatic run(input int t, input int e, input int a, input int b);
    int costs [4];
    int best;
    n_ty = 6'(t); n_te = 6'(e); n_2 = 6'(a); n_4ss = 6'(b);
    #1;
    costs[0] = 0;                 // none  -> code 00
    costs[1] = P - 2 * t;         // odd   -> code 10
    costs[2] = P - 2 * e;         // even  -> code 01
    costs[3] = 2 * b - 2 * a;     // full  -> code 11
    best = 0;
    for (int k = 1; k < 4; k++) if (costs[k] < costs[best]) best = k;
    seen[best]++;
    checks++;
    if ({odd_inv, even_inv} !== ((best == 0) ? 2'b00 : (best == 1) ? 2'b10 :
                                 (best == 2) ? 2'b01 : 2'b11)) begin
      failures++;
      if (failures < 10)
        $display("FAIL ty=%0d te=%0d t2=%0d t4=%0d -> %b%b", t, e, a, b, odd_inv, even_inv);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ties
    run(16, 16, 0, 0);   // all gains zero: none
    run(20, 20, 0, 0);   // odd = even: odd
    run(20, 10, 6, 2);   // odd = full: odd
    run(10, 20, 6, 2);   // even = full: even
    run(10, 10, 9, 1);   // full only
    for (int i = 0; i < 20000; i++) begin
      int a;
      a = $urandom_range(0, P);
      run($urandom_range(0, P), $urandom_range(0, P), a, $urandom_range(0, P - a));
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
