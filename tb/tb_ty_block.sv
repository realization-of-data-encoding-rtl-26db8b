// Exhaustive test of the Ty/Te pair detector, both orientations, against the
// odd-inversion transition table written out by hand: with line i+1 inverted a
// pair gains from the inversion for the Type II transitions and for the Type I
// transitions that become Type III or IV (00->10, 11->01, 00->01, 11->10,
// 01->00, 10->11). With line i inverted the table is the same with the two
// lines swapped.
module tb_ty_block;
  logic [1:0] prev, cur;
  logic       ty_hi, ty_lo;
  int checks = 0, failures = 0;

  ty_block #(.INV_HI(1'b1)) dut_hi (.prev(prev), .cur(cur), .ty(ty_hi));
  ty_block #(.INV_HI(1'b0)) dut_lo (.prev(prev), .cur(cur), .ty(ty_lo));

  // {line i before, line i+1 before, line i after, line i+1 after}
  localparam logic [3:0] GAINS [8] = '{4'b0010, 4'b1101, 4'b0001, 4'b1110,
                                       4'b0100, 4'b1011, 4'b0110, 4'b1001};

  function automatic bit in_table(input logic a0, b0, a1, b1);
    foreach (GAINS[k]) if (GAINS[k] == {a0, b0, a1, b1}) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_hi;
    n_hi = 0;
    for (int v = 0; v < 16; v++) begin
      prev = v[1:0];
      cur  = v[3:2];
      #1;
      checks++;
      if (ty_hi !== in_table(prev[0], prev[1], cur[0], cur[1])) begin
        failures++;
        $display("FAIL hi prev=%b cur=%b ty=%b", prev, cur, ty_hi);
      end
      checks++;
      if (ty_lo !== in_table(prev[1], prev[0], cur[1], cur[0])) begin
        failures++;
        $display("FAIL lo prev=%b cur=%b ty=%b", prev, cur, ty_lo);
      end
      n_hi += int'(ty_hi);
    end
    // Half of the sixteen transitions gain from a one-line inversion.
    checks++;
    if (n_hi != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
