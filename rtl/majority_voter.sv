// majority_voter: three-way majority vote of NIN one-bit inputs.
//
// The number of ones among the inputs is compared with half the input count.
// The 2-bit result says "majority of ones" (2*ones > NIN), "majority of zeros"
// (2*ones < NIN) or "tie" (2*ones == NIN, only possible for even NIN). A tie
// is resolved later, by the select stage of the variable node, with the
// received channel bit. Purely combinational. For d_v = 4 the variable node
// uses it with NIN = 4 for the extrinsic messages (tie at two ones, which is
// b_n = ceil(d_v/2)) and NIN = 5 for the a-posteriori decision. The three-way
// function is the one of the decoder's voters; the counter-and-compare
// structure is this design's own.
module majority_voter
  import pgab_pkg::*;
#(
  parameter int unsigned NIN = 4
) (
  input  logic [NIN-1:0] in_bits,
  output vote_e          vote
);

  localparam int unsigned CW = $clog2(NIN + 1) + 1;

  logic [CW-1:0] twice_ones;

  always_comb begin
    twice_ones = '0;
    for (int unsigned k = 0; k < NIN; k++) twice_ones = twice_ones + CW'(in_bits[k]);
    twice_ones = twice_ones << 1;
  end

  always_comb begin
    if (twice_ones > CW'(NIN))      vote = VOTE_ONES;
    else if (twice_ones < CW'(NIN)) vote = VOTE_ZEROS;
    else                            vote = VOTE_TIE;
  end

endmodule
