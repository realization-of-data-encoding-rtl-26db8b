// Ones counter: all-zero, all-one, single-bit and random vectors at the default
// size (31 inputs) and at 32 inputs, against a bit-by-bit count.
module tb_ones_counter;
  logic [30:0] v31;
  logic [31:0] v32;
  logic [4:0]  c31;
  logic [5:0]  c32;
  int checks = 0, failures = 0;

  ones_counter dut31 (.bits_in(v31), .count(c31));
  ones_counter #(.N(32)) dut32 (.bits_in(v32), .count(c32));

  function automatic int ref_count(input logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) if (v[i]) n++;
    return n;
  endfunction

  task automatic check(input logic [31:0] v);
    v31 = v[30:0];
    v32 = v;
    #1;
    checks += 2;
    if (int'(c31) != ref_count({33'd0, v[30:0]})) begin
      failures++;
      $display("FAIL n=31 v=%h count=%0d", v[30:0], c31);
    end
    if (int'(c32) != ref_count({32'd0, v})) begin
      failures++;
      $display("FAIL n=32 v=%h count=%0d", v, c32);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    for (int i = 0; i < 32; i++) check(32'd1 << i);
    for (int i = 0; i < 500; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
