// tb_qc_hmatrix_net: checks the H-matrix interconnect at the default code
// (12 x 24 blocks of Z = 54, DV = 4, DC = 8: N = 1296, M = 648) against the
// matrix definition written out independently here: edge e of variable
// n = j*Z + c goes to block-row (j + e) mod 12, check row (c - e*j) mod Z, and
// the checks list their variables by increasing block-column. Random patterns
// are driven on all inputs and every routed bit is compared in both
// directions.
module tb_qc_hmatrix_net;

  localparam int Z = 54, MB = 12, NB = 24, DV = 4, DC = 8;
  localparam int N = NB * Z, M = MB * Z;

  int checks = 0, failures = 0;

  logic [N*DV-1:0] v_edge, c_edge;
  logic [N-1:0]    d;
  logic [M*DC-1:0] cnu_v, cnu_d, cnu_c;

  qc_hmatrix_net #(.Z(Z), .MB(MB), .NB(NB), .DV(DV), .DC(DC)) dut (.v_edge, .d, .cnu_v, .cnu_d, .cnu_c, .c_edge);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pin table built from the variable side
  int pin_n [M][DC], pin_e [M][DC];

  initial begin
    int fill [M];
    foreach (fill[m]) fill[m] = 0;
    for (int j = 0; j < NB; j++)
      for (int c = 0; c < Z; c++)
        for (int e = 0; e < DV; e++) begin
          int m;
          m = ((j + e) % MB) * Z + (c + Z - (e * j) % Z) % Z;
          pin_n[m][fill[m]] = j * Z + c;
          pin_e[m][fill[m]] = e;
          fill[m]++;
        end
    for (int t = 0; t < 20; t++) begin
      int bad;
      for (int b = 0; b < N * DV; b++) v_edge[b] = $urandom % 2;
      for (int b = 0; b < N; b++)      d[b]      = $urandom % 2;
      for (int b = 0; b < M * DC; b++) cnu_c[b]  = $urandom % 2;
      #1;
      bad = 0;
      for (int m = 0; m < M; m++)
        for (int k = 0; k < DC; k++) begin
          int n, e;
          n = pin_n[m][k];
          e = pin_e[m][k];
          if (cnu_v[m*DC + k] !== v_edge[n*DV + e]) bad++;
          if (cnu_d[m*DC + k] !== d[n]) bad++;
          if (c_edge[n*DV + e] !== cnu_c[m*DC + k]) bad++;
        end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: pattern %0d, %0d misrouted bits", t, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
