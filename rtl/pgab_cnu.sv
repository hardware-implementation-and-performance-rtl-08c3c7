// pgab_cnu: check node unit of the GaB / PGaB decoder.
//
// For each of its DC edges the CNU returns the XOR of the other DC-1
// variable-to-check messages (the extrinsic parity, c[k] = XOR of v[j], j != k).
// It also returns s, the XOR of the DC a-posteriori decisions of its variable
// nodes: s = 1 means this parity check is not satisfied by the current
// decision word. Purely combinational; the decoder registers c. This is the
// check node as specified (one DC-input XOR and DC (DC-1)-input XORs).
module pgab_cnu #(
  parameter int unsigned DC = 8
) (
  input  logic [DC-1:0] v,   // variable-to-check messages
  input  logic [DC-1:0] d,   // decisions of the attached variable nodes
  output logic [DC-1:0] c,   // check-to-variable messages
  output logic          s    // parity of the decisions (1 = unsatisfied)
);

  for (genvar k = 0; k < DC; k++) begin : g_out
    logic [DC-1:0] mask;
    always_comb begin
      mask    = '1;
      mask[k] = 1'b0;
    end
    assign c[k] = ^(v & mask);
  end

  assign s = ^d;

endmodule
