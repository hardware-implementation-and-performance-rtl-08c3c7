// tb_majority_voter: exhaustive test of the three-way majority voter for the
// input counts the decoder uses (3, 4 and 5 inputs). The expected outcome is
// worked out by counting ones in the testbench: more ones than zeros, more
// zeros than ones, or a tie.
module tb_majority_voter;
  import pgab_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0] in3;  vote_e o3;
  logic [3:0] in4;  vote_e o4;
  logic [4:0] in5;  vote_e o5;

  majority_voter #(.NIN(3)) u3 (.in_bits(in3), .vote(o3));
  majority_voter #(.NIN(4)) u4 (.in_bits(in4), .vote(o4));
  majority_voter #(.NIN(5)) u5 (.in_bits(in5), .vote(o5));

  function automatic vote_e expect_vote(int ones, int total);
    if (ones > total - ones) return VOTE_ONES;
    if (ones < total - ones) return VOTE_ZEROS;
    return VOTE_TIE;
  endfunction

  task automatic check(vote_e got, vote_e exp, int nin, int val);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: NIN=%0d in=%b got %s expected %s", nin, val, got.name(), exp.name());
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++) begin
      in3 = x[2:0];
      in4 = x[3:0];
      in5 = x[4:0];
      #1;
      if (x < 8)  check(o3, expect_vote($countones(x[2:0]), 3), 3, x);
      if (x < 16) check(o4, expect_vote($countones(x[3:0]), 4), 4, x);
      check(o5, expect_vote($countones(x[4:0]), 5), 5, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
