// tb_qc_hmatrix: checks the quasi-cyclic H matrix functions for the decoder's
// codes: (Z, MB, NB, DV, DC) = (54, 12, 24, 4, 8), (54, 12, 24, 3, 6),
// (81, 4, 16, 4, 16), (79, 4, 28, 4, 28), (31, 3, 5, 3, 5) and the reduced
// (17, 12, 24, 4, 8). For each it builds the edge list from the functions,
// then verifies that every check has DC distinct neighbours in distinct
// block-columns, every variable has exactly DV checks in distinct block-rows,
// that the two lookup directions agree, that every flat edge index is used
// once, and that no two checks share two variables (no 4-cycles).
module tb_qc_hmatrix;
  import qc_hmatrix_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic test_code(int z, int mb, int nb, int dv, int dc);
    int n_cnt = nb * z, m_cnt = mb * z;
    int vdeg [];
    bit used [];
    bit ok_deg, ok_inv, ok_blk, ok_edge, ok_girth;
    bit pair_seen [longint];
    vdeg = new[n_cnt];
    used = new[n_cnt * dv];
    ok_deg = 1; ok_inv = 1; ok_blk = 1; ok_edge = 1; ok_girth = 1;
    for (int m = 0; m < m_cnt; m++) begin
      int nbr [];
      nbr = new[dc];
      for (int k = 0; k < dc; k++) begin
        int n, ei;
        n  = cnu_to_vnu(m, k, z, nb, mb, dv);
        ei = cnu_edge_index(m, k, z, nb, mb, dv);
        nbr[k] = n;
        if (n >= n_cnt || ei / dv != n) ok_edge = 0;
        else begin
          if (used[ei]) ok_edge = 0;
          used[ei] = 1;
          vdeg[n]++;
          if (vnu_to_cnu(n, ei % dv, z, mb, dv) != m) ok_inv = 0;
        end
        for (int k2 = 0; k2 < k; k2++) if (nbr[k2] / z == n / z) ok_blk = 0;
      end
      for (int a = 0; a < dc; a++)
        for (int b = a + 1; b < dc; b++) begin
          longint key;
          key = longint'(nbr[a]) * n_cnt + longint'(nbr[b]);
          if (nbr[a] > nbr[b]) key = longint'(nbr[b]) * n_cnt + longint'(nbr[a]);
          if (pair_seen.exists(key)) ok_girth = 0;
          pair_seen[key] = 1;
        end
    end
    foreach (vdeg[n]) if (vdeg[n] != dv) ok_deg = 0;
    for (int n = 0; n < n_cnt; n++)
      for (int e = 0; e < dv; e++)
        for (int e2 = 0; e2 < e; e2++)
          if (vnu_to_cnu(n, e, z, mb, dv) / z == vnu_to_cnu(n, e2, z, mb, dv) / z) ok_blk = 0;
    check(ok_deg, $sformatf("Z=%0d DC=%0d variable degrees", z, dc));
    check(ok_blk, $sformatf("Z=%0d DC=%0d one edge per block", z, dc));
    check(ok_inv, $sformatf("Z=%0d DC=%0d lookups agree", z, dc));
    check(ok_edge, $sformatf("Z=%0d DC=%0d edge indices", z, dc));
    check(ok_girth, $sformatf("Z=%0d DC=%0d no 4-cycles", z, dc));
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    test_code(54, 12, 24, 4, 8);
    test_code(54, 12, 24, 3, 6);
    test_code(81, 4, 16, 4, 16);
    test_code(79, 4, 28, 4, 28);
    test_code(31, 3, 5, 3, 5);
    test_code(17, 12, 24, 4, 8);
    check(qc_shift(0, 5, 54) == 0 && qc_shift(3, 7, 54) == 21 && qc_shift(3, 27, 79) == 2,
          "shift values");
    check(qc_block_row(11, 2, 12, 4) == 1 && qc_block_row(4, 2, 4, 4) == 2 &&
          qc_block_edge(1, 11, 12, 4) == 2 && qc_block_edge(5, 11, 12, 4) == 4,
          "block layout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
