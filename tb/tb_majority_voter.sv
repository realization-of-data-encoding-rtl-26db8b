// Majority voter with 31 inputs: for every number of set inputs k = 0..31,
// random vectors with exactly k ones; the output must be 1 exactly when k >= 16.
module tb_majority_voter;
  logic [30:0] votes;
  logic        majority;
  int checks = 0, failures = 0;

  majority_voter dut (.votes(votes), .majority(majority));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 31; k++) begin
      for (int rep = 0; rep < 8; rep++) begin
        // place k ones at random positions
        votes = '0;
        for (int placed = 0; placed < k; ) begin
          int pos;
          pos = $urandom_range(0, 30);
          if (!votes[pos]) begin
            votes[pos] = 1'b1;
            placed++;
          end
        end
        #1;
        checks++;
        if (majority !== (k >= 16)) begin
          failures++;
          $display("FAIL k=%0d votes=%b majority=%b", k, votes, majority);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
