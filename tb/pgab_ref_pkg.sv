// pgab_ref_pkg: bit-accurate behavioural reference of the hybrid GaB/PGaB
// decoder, written independently of the RTL, for the decoder testbenches.
//
// pgab_ref holds the H matrix of the code (MB x NB blocks of size Z; edge e
// of block-column j lands in block-row (j+e) mod MB, or e when MB = DV, in a
// circulant shifted by e*j mod Z: variable j*Z + c meets check row
// (c - e*j) mod Z of that block-row), built here from the variable side,
// its own copy of the random bit generator (32-bit LFSR
// x^32+x^22+x^2+x+1 compared with a threshold, N-bit shift register filled
// after reset) and the message-passing schedule: check nodes from v, syndrome
// of d, stop on success or after IMAX iterations, otherwise variable nodes
// from c, with the channel bit disturbed by the random bit from iteration S_I
// on and one new random bit per disturbed iteration.
package pgab_ref_pkg;

  class pgab_ref #(
    int Z = 54, int MB = 12, int NB = 24, int DV = 4, int DC = 8,
    int S_I = 15, int IMAX = 300,
    bit [31:0] SEED = 32'h1D87_2B41, bit [31:0] TH = 32'h3333_3333
  );
    localparam int N = NB * Z;
    localparam int M = MB * Z;

    int  chk_vn [M][DC];   // VNU on input k of check m
    int  chk_e  [M][DC];   // and the edge of that VNU
    bit  p [N];
    bit [31:0] lfsr;
    int  steps;            // number of random bits drawn after the fill

    function new();
      int fill [M];
      foreach (fill[m]) fill[m] = 0;
      for (int n = 0; n < N; n++)
        for (int e = 0; e < DV; e++) begin
          int j, row, m;
          j   = n / Z;
          row = (MB == DV) ? e : (j + e) % MB;
          m   = row * Z + ((n % Z) - (e * j) % Z + Z) % Z;
          if (fill[m] >= DC) $fatal(1, "pgab_ref: check %0d has too many edges", m);
          chk_vn[m][fill[m]] = n;
          chk_e[m][fill[m]]  = e;
          fill[m]++;
        end
      lfsr  = SEED;
      steps = 0;
      foreach (p[n]) p[n] = 0;
      for (int k = 0; k < N; k++) draw();
      steps = 0;
    endfunction

    function void draw();
      bit b;
      b = (lfsr < TH);
      for (int n = N - 1; n > 0; n--) p[n] = p[n-1];
      p[0] = b;
      lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      steps++;
    endfunction

    static function bit maj(int ones, int total, bit tie);
      if (2 * ones > total) return 1;
      if (2 * ones < total) return 0;
      return tie;
    endfunction

    // Decode r; returns decided word, success flag and iteration count.
    function void decode(input bit r [N], output bit d [N], output bit ok,
                         output int iters);
      bit v [N][DV];
      bit c [N][DV];
      int it;
      for (int n = 0; n < N; n++) begin
        d[n] = r[n];
        for (int e = 0; e < DV; e++) v[n][e] = r[n];
      end
      it = 0;
      forever begin
        bit unsat;
        unsat = 0;
        // check nodes
        for (int m = 0; m < M; m++) begin
          bit tv, td;
          tv = 0;
          td = 0;
          for (int k = 0; k < DC; k++) begin
            tv ^= v[chk_vn[m][k]][chk_e[m][k]];
            td ^= d[chk_vn[m][k]];
          end
          for (int k = 0; k < DC; k++)
            c[chk_vn[m][k]][chk_e[m][k]] = tv ^ v[chk_vn[m][k]][chk_e[m][k]];
          if (td) unsat = 1;
        end
        if (!unsat) begin ok = 1; iters = it; return; end
        if (it == IMAX) begin ok = 0; iters = it; return; end
        // variable nodes
        for (int n = 0; n < N; n++) begin
          bit rm;
          int all;
          rm  = r[n] ^ (p[n] & (it >= S_I));
          all = 0;
          for (int e = 0; e < DV; e++) all += c[n][e];
          for (int e = 0; e < DV; e++) v[n][e] = maj(all - c[n][e] + rm, DV, r[n]);
          d[n] = maj(all + r[n], DV + 1, r[n]);
        end
        if (it >= S_I) draw();
        it++;
      end
    endfunction
  endclass

endpackage
