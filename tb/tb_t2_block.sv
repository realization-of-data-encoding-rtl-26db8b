// Exhaustive test of the Type II detector: only 01->10 and 10->01 are Type II
// (both lines switch in opposite directions).
module tb_t2_block;
  logic [1:0] prev, cur;
  logic       t2;
  int checks = 0, failures = 0;

  t2_block dut (.prev(prev), .cur(cur), .t2(t2));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp;
      prev = v[1:0];
      cur  = v[3:2];
      #1;
      exp = (prev == 2'b01 && cur == 2'b10) || (prev == 2'b10 && cur == 2'b01);
      checks++;
      if (t2 !== exp) begin
        failures++;
        $display("FAIL prev=%b cur=%b t2=%b", prev, cur, t2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
