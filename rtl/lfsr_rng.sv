// lfsr_rng: Bernoulli(p_v) random bits for the N variable nodes.
//
// A 32-bit Fibonacci LFSR (x^32 + x^22 + x^2 + x + 1) is compared with the
// threshold THRESH; the comparator output (1 when lfsr < THRESH, so with
// probability THRESH / 2^32, 0.2 by default) is shifted into an N-bit shift
// register whose bit n feeds variable node n. After reset the unit fills the
// whole register, one bit per cycle, and raises ready after N cycles; this
// fill is paid once. From then on it produces one new bit, and shifts the
// register by one place, in each cycle where step is high. The decoder steps
// it once per PGaB iteration, so the RNG is idle while the decoder runs plain
// Gallager-B.
//
// The LFSR, comparator and shift register follow the decoder's RNG; the
// polynomial, seed and the fill-once-after-reset policy are this design's
// choices.
module lfsr_rng
  import pgab_pkg::*;
#(
  parameter int unsigned        N      = 1296,
  parameter logic [LFSR_W-1:0]  SEED   = LFSR_SEED_DEFAULT,
  parameter logic [LFSR_W-1:0]  THRESH = PV_THRESHOLD_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,    // advance one bit (ignored until ready)
  output logic         ready,   // shift register holds N generated bits
  output logic [N-1:0] p        // one random bit per variable node
);

  localparam int unsigned FW = $clog2(N + 1);

  initial assert (N >= 2) else $error("lfsr_rng: N must be at least 2");

  logic [LFSR_W-1:0] lfsr_q;
  logic [FW-1:0]     fill_q;
  logic              adv;
  logic              bit_new;

  assign ready   = (fill_q == FW'(N));
  assign adv     = !ready || step;
  assign bit_new = (lfsr_q < THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= SEED;
      fill_q <= '0;
      p      <= '0;
    end else if (adv) begin
      lfsr_q <= lfsr_next(lfsr_q);
      p      <= {p[N-2:0], bit_new};
      if (!ready) fill_q <= fill_q + 1'b1;
    end
  end

endmodule
