// qc_hmatrix_net: the H-matrix interconnect between the variable node units
// and the check node units of the fully parallel decoder.
//
// Messages are kept per variable node: bit n*DV + e of v_edge / c_edge is the
// message on edge e of VNU n. This network gathers, for every check node m, its DC variable-to-check
// messages (cnu_v) and the DC decisions of its variable nodes (cnu_d), and
// scatters the DC check-to-variable messages each check node produces
// (cnu_c) back to the edge slots of the variable nodes (c_edge). The wiring is
// the quasi-cyclic H of qc_hmatrix_pkg: an MB x NB base matrix of Z x Z
// blocks with DV non-zero blocks per block-column and DC per block-row. It
// contains no logic gates: being a fixed permutation of wires is the whole function of this block, so every output
// bit is one input bit. The decoder uses it in both directions every cycle.
module qc_hmatrix_net
  import qc_hmatrix_pkg::*;
#(
  parameter int unsigned  Z  = 54,
  parameter int unsigned  MB = 12,
  parameter int unsigned  NB = 24,
  parameter int unsigned  DV = 4,
  parameter int unsigned  DC = 8,
  localparam int unsigned N  = NB * Z,
  localparam int unsigned M  = MB * Z
) (
  input  logic [N*DV-1:0] v_edge,  // variable-to-check messages, VNU order
  input  logic [N-1:0]    d,       // decisions, one per VNU
  output logic [M*DC-1:0] cnu_v,   // bit m*DC + k: message into pin k of CNU m
  output logic [M*DC-1:0] cnu_d,   // bit m*DC + k: decision of the VNU on pin k
  input  logic [M*DC-1:0] cnu_c,   // bit m*DC + k: message out of pin k of CNU m
  output logic [N*DV-1:0] c_edge   // check-to-variable messages, VNU order
);

  // The base matrix must be regular: DV blocks per column, DC per row.
  initial assert (NB * DV == MB * DC && DV <= MB && (MB == DV || NB % MB == 0))
    else $fatal(1, "qc_hmatrix_net: base matrix MB x NB cannot be regular");

  for (genvar m = 0; m < M; m++) begin : g_chk
    for (genvar k = 0; k < DC; k++) begin : g_pin
      localparam int unsigned EI = cnu_edge_index(m, k, Z, NB, MB, DV);
      localparam int unsigned VI = cnu_to_vnu(m, k, Z, NB, MB, DV);
      assign cnu_v[m*DC + k] = v_edge[EI];
      assign cnu_d[m*DC + k] = d[VI];
      assign c_edge[EI]      = cnu_c[m*DC + k];
    end
  end

endmodule
