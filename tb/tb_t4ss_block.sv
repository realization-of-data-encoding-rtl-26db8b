// Exhaustive test of the T4** detector: only 01->01 and 10->10 qualify (no line
// switches, and the two lines differ, so full inversion would make them Type II).
module tb_t4ss_block;
  logic [1:0] prev, cur;
  logic       t4ss;
  int checks = 0, failures = 0;

  t4ss_block dut (.prev(prev), .cur(cur), .t4ss(t4ss));

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
      exp = (prev == 2'b01 && cur == 2'b01) || (prev == 2'b10 && cur == 2'b10);
      checks++;
      if (t4ss !== exp) begin
        failures++;
        $display("FAIL prev=%b cur=%b t4ss=%b", prev, cur, t4ss);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
