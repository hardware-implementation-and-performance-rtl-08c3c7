// qc_hmatrix_pkg: the quasi-cyclic parity check matrix H that fixes the wiring
// between the variable node units (VNUs) and check node units (CNUs).
//
// H is an MB x NB base matrix of Z x Z blocks, so N = NB*Z columns and
// M = MB*Z rows. Each block is either all-zero or a cyclically shifted
// identity. Block-column j has DV non-zero blocks: edge e (0..DV-1) of every
// VNU in block-column j goes to block-row (j + e) mod MB, or simply to
// block-row e when MB == DV (every block present). When NB/MB = DC/DV is an
// integer every block-row then holds exactly DC non-zero blocks, so H is
// regular with column weight DV and row weight DC. The block reached by edge
// e of block-column j is shifted by s = (e*j) mod Z.
//
// For the default Z=54, MB=12, NB=24, DV=4, DC=8 this gives N=1296, M=648,
// rate 1/2. The sizes follow the decoder's main code; the base matrix layout
// and the shift values are this design's own choice. They were picked so that
// H has no cycle of length 4 for every size used in this project (checked by
// tb_qc_hmatrix).
//
// Edge numbering: the message on edge e of VNU n lives at flat index
// n*DV + e. The k-th input of CNU m = i*Z + t (block-row i) comes from the
// k-th non-zero block of block-row i, counted from block-column 0 upwards.
package qc_hmatrix_pkg;

  // Block-row reached by edge e of block-column j.
  function automatic int unsigned qc_block_row(int unsigned j, int unsigned e,
                                               int unsigned mb, int unsigned dv);
    return (mb == dv) ? e : (j + e) % mb;
  endfunction

  // Edge number of block-column j that lands in block-row i, or dv if the
  // block (i,j) is zero.
  function automatic int unsigned qc_block_edge(int unsigned i, int unsigned j,
                                                int unsigned mb, int unsigned dv);
    int unsigned e;
    e = (mb == dv) ? i : (i + mb - j % mb) % mb;
    return (e < dv) ? e : dv;
  endfunction

  function automatic int unsigned qc_shift(int unsigned e, int unsigned j, int unsigned z);
    return (e * j) % z;
  endfunction

  // Block-column of the k-th non-zero block in block-row i.
  function automatic int unsigned qc_pin_column(int unsigned i, int unsigned k, int unsigned nb,
                                                int unsigned mb, int unsigned dv);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned j = 0; j < nb; j++) begin
      if (qc_block_edge(i, j, mb, dv) < dv) begin
        if (cnt == k) return j;
        cnt++;
      end
    end
    return nb;  // k out of range
  endfunction

  // VNU attached to input k of CNU m.
  function automatic int unsigned cnu_to_vnu(int unsigned m, int unsigned k, int unsigned z,
                                             int unsigned nb, int unsigned mb, int unsigned dv);
    int unsigned i, t, j, e;
    i = m / z;
    t = m % z;
    j = qc_pin_column(i, k, nb, mb, dv);
    e = qc_block_edge(i, j, mb, dv);
    return j * z + (t + qc_shift(e, j, z)) % z;
  endfunction

  // CNU attached to edge e of VNU n.
  function automatic int unsigned vnu_to_cnu(int unsigned n, int unsigned e, int unsigned z,
                                             int unsigned mb, int unsigned dv);
    int unsigned j, c;
    j = n / z;
    c = n % z;
    return qc_block_row(j, e, mb, dv) * z + (c + z - qc_shift(e, j, z)) % z;
  endfunction

  // Flat index (n*DV + e) of the message on input k of CNU m.
  function automatic int unsigned cnu_edge_index(int unsigned m, int unsigned k, int unsigned z,
                                                 int unsigned nb, int unsigned mb,
                                                 int unsigned dv);
    int unsigned j;
    j = qc_pin_column(m / z, k, nb, mb, dv);
    return cnu_to_vnu(m, k, z, nb, mb, dv) * dv + qc_block_edge(m / z, j, mb, dv);
  endfunction

endpackage
