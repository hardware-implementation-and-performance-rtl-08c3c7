// pgab_pkg: types and constants shared by the hybrid Gallager-B / probabilistic
// Gallager-B (PGaB) LDPC decoder.
//
// The majority vote of a variable node has three outcomes (majority of ones,
// majority of zeros, tie); vote_e encodes them on two bits,
// one flag per strict outcome, so that a tie is "neither". The decoder state
// machine uses dec_state_e. The random-number constants follow the 32-bit LFSR
// and threshold comparator of the decoder's random number generator: the
// threshold is p_v = 0.2 scaled to 32 bits. The LFSR polynomial and seed are
// this design's choice.
package pgab_pkg;

  // Outcome of a majority vote.
  typedef enum logic [1:0] {
    VOTE_TIE   = 2'b00,  // as many ones as zeros: the select unit passes r_n
    VOTE_ZEROS = 2'b01,  // more zeros than ones
    VOTE_ONES  = 2'b10   // more ones than zeros
  } vote_e;

  // Decoder sequencing states.
  typedef enum logic [1:0] {
    ST_FILL = 2'b00,  // random bit shift register is being filled after reset
    ST_IDLE = 2'b01,  // waiting for a frame
    ST_CNU  = 2'b10,  // check node cycle: c <= CNU(v), syndrome of d tested
    ST_VNU  = 2'b11   // variable node cycle: v, d <= VNU(c, r, p)
  } dec_state_e;

  localparam int unsigned LFSR_W = 32;

  // Fibonacci LFSR, polynomial x^32 + x^22 + x^2 + x + 1 (maximal length).
  localparam int unsigned LFSR_TAP_A = 31;
  localparam int unsigned LFSR_TAP_B = 21;
  localparam int unsigned LFSR_TAP_C = 1;
  localparam int unsigned LFSR_TAP_D = 0;

  localparam logic [LFSR_W-1:0] LFSR_SEED_DEFAULT = 32'h1D87_2B41;

  // p_v = 0.2: P(lfsr < threshold) = 0x33333333 / 2^32 = 0.2
  localparam logic [LFSR_W-1:0] PV_THRESHOLD_DEFAULT = 32'h3333_3333;

  // Next state of the LFSR.
  function automatic logic [LFSR_W-1:0] lfsr_next(logic [LFSR_W-1:0] s);
    logic fb;
    fb = s[LFSR_TAP_A] ^ s[LFSR_TAP_B] ^ s[LFSR_TAP_C] ^ s[LFSR_TAP_D];
    return {s[LFSR_W-2:0], fb};
  endfunction


endpackage
