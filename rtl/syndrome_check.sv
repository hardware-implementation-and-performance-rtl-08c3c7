// syndrome_check: the compute-syndrome unit of the decoder.
//
// Takes the M check parities s[m] produced by the CNUs (1 = check unsatisfied)
// and reports converged = 1 when every check is satisfied, i.e. the decision
// word d satisfies H d^T = 0. An OR tree, purely combinational; the controller
// samples converged in its check node cycle.
module syndrome_check #(
  parameter int unsigned M = 648
) (
  input  logic [M-1:0] s,
  output logic         converged
);

  assign converged = ~(|s);

endmodule
