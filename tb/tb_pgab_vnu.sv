// tb_pgab_vnu: test of the GaB/PGaB variable node unit.
//
// Part 1 replays the 16-row truth table of the algorithm for d_v = 4 (received
// bit and three extrinsic check messages -> message on the fourth edge), GaB
// column with ctrl = 0 and PGaB column with ctrl = 1, p = 1. Part 2 checks all
// 2^7 input combinations of a d_v = 4 node and all 2^6 of a d_v = 3 node
// against the message and decision rules computed in the testbench.
module tb_pgab_vnu;

  int checks = 0, failures = 0;

  logic r4, p4, ctrl4;  logic [3:0] c4, v4;  logic d4;
  logic r3, p3, ctrl3;  logic [2:0] c3, v3;  logic d3;

  pgab_vnu #(.DV(4)) u4 (.r(r4), .p(p4), .ctrl(ctrl4), .c(c4), .v(v4), .d(d4));
  pgab_vnu #(.DV(3)) u3 (.r(r3), .p(p3), .ctrl(ctrl3), .c(c3), .v(v3), .d(d3));

  // Truth table rows ordered by {r, c1, c2, c3}; bit 15 is row 0.
  localparam logic [15:0] TT_GAB  = 16'b0000_0001_0111_1111;
  localparam logic [15:0] TT_PGAB = 16'b0001_0111_0001_0111;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit rule(int ones, int total, bit tie);
    if (2 * ones > total) return 1;
    if (2 * ones < total) return 0;
    return tie;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Part 1: truth table, output on edge 4 (index 3), c4 unused
    for (int row = 0; row < 16; row++) begin
      for (int c4v = 0; c4v < 2; c4v++) begin
        r4 = row[3];
        c4 = {c4v[0], row[0], row[1], row[2]};
        p4 = 1;
        ctrl4 = 0;
        #1;
        check(v4[3] == TT_GAB[15-row], $sformatf("GaB table row %0d", row));
        ctrl4 = 1;
        #1;
        check(v4[3] == TT_PGAB[15-row], $sformatf("PGaB table row %0d", row));
      end
    end
    // Part 2: exhaustive d_v = 4
    for (int x = 0; x < 128; x++) begin
      bit rm;
      int all;
      {ctrl4, p4, r4, c4} = x[6:0];
      #1;
      rm  = r4 ^ (p4 & ctrl4);
      all = $countones(c4);
      for (int e = 0; e < 4; e++)
        check(v4[e] == rule(all - c4[e] + rm, 4, r4), $sformatf("dv4 in=%b edge %0d", x[6:0], e));
      check(d4 == rule(all + r4, 5, r4), $sformatf("dv4 in=%b decision", x[6:0]));
    end
    // Part 2: exhaustive d_v = 3
    for (int x = 0; x < 64; x++) begin
      bit rm;
      int all;
      {ctrl3, p3, r3, c3} = x[5:0];
      #1;
      rm  = r3 ^ (p3 & ctrl3);
      all = $countones(c3);
      for (int e = 0; e < 3; e++)
        check(v3[e] == rule(all - c3[e] + rm, 3, r3), $sformatf("dv3 in=%b edge %0d", x[5:0], e));
      check(d3 == rule(all + r3, 4, r3), $sformatf("dv3 in=%b decision", x[5:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
