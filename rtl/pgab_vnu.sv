// pgab_vnu: variable node unit of the hybrid GaB / PGaB decoder.
//
// Inputs are the received channel bit r, the node's random bit p, the mode bit
// ctrl (0 = Gallager-B, 1 = probabilistic Gallager-B) and the DV messages c[e]
// from the node's check nodes. For every edge e the extrinsic message v[e] is a
// majority vote over DV bits, the other DV-1 check messages plus
// r' = r ^ (p & ctrl): a majority of ones gives 1, of zeros gives 0, and a tie
// (DV/2 ones, i.e. b_n = ceil(DV/2) for DV = 4) passes the unmodified r. So
// when p & ctrl is 1 the channel bit cannot win a tie for itself and, for
// DV = 4, the message is the majority of the three extrinsic check messages
// (the PGaB column of the algorithm's truth table). The decision d is a
// majority vote over r and all DV check messages (five inputs for DV = 4, so
// it has no tie); it always uses the unmodified r.
// Purely combinational; the decoder registers v and d.
//
// Follows the PGaB variable node: DV four-input voters, one (DV+1)-input
// voter, select units, and an AND/XOR gate pair that gates p with ctrl.
module pgab_vnu
  import pgab_pkg::*;
#(
  parameter int unsigned DV = 4
) (
  input  logic          r,      // received channel bit r_n
  input  logic          p,      // random bit p_n from the RNG shift register
  input  logic          ctrl,   // 1 = PGaB mode
  input  logic [DV-1:0] c,      // check-to-variable messages
  output logic [DV-1:0] v,      // variable-to-check messages
  output logic          d       // a-posteriori decision
);

  logic r_mod;
  assign r_mod = r ^ (p & ctrl);

  // Select unit: resolve a vote, passing r on a tie.
  function automatic logic select_vote(vote_e vt, logic rr);
    unique case (vt)
      VOTE_ONES:  return 1'b1;
      VOTE_ZEROS: return 1'b0;
      default:    return rr;
    endcase
  endfunction

  for (genvar e = 0; e < DV; e++) begin : g_edge
    logic [DV-1:0] vin;
    vote_e         vt;
    // Inputs: r' in bit 0, then every check message except c[e].
    always_comb begin
      int unsigned k;
      vin    = '0;
      vin[0] = r_mod;
      k      = 1;
      for (int unsigned x = 0; x < DV; x++) begin
        if (x != e) begin
          vin[k] = c[x];
          k++;
        end
      end
    end
    majority_voter #(.NIN(DV)) u_mv (.in_bits(vin), .vote(vt));
    assign v[e] = select_vote(vt, r);
  end

  vote_e dvote;
  majority_voter #(.NIN(DV + 1)) u_mv_dec (.in_bits({c, r}), .vote(dvote));
  assign d = select_vote(dvote, r);

endmodule
