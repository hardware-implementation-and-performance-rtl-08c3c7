// pgab_decoder: fully parallel hard-decision LDPC decoder for the binary
// symmetric channel, running Gallager-B (GaB) for the first S_I iterations and
// probabilistic Gallager-B (PGaB) after that.
//
// Structure: N = NB*Z variable node units (pgab_vnu), M = MB*Z check node units
// (pgab_cnu), the quasi-cyclic H matrix wiring between them (qc_hmatrix_net),
// a compute-syndrome OR tree (syndrome_check), an LFSR random bit generator
// with an N-bit shift register (lfsr_rng) and a state machine
// (pgab_controller). Registers hold the received word r, the N*DV
// variable-to-check messages v, the N*DV check-to-variable messages c and the
// decision word d. One iteration takes two cycles: a check node cycle that
// registers c = CNU(v) and tests the syndrome of d, and a variable node cycle
// that registers v, d = VNU(c, r, p). In the PGaB iterations each VNU whose
// random bit is 1 ignores its channel bit in its extrinsic vote.
//
// Interface: after reset the RNG fill takes N cycles (ready low). With ready
// high, a start pulse takes the frame on r_in. done pulses 2k+2 cycles later,
// k being the iteration count, with d_out (decided word), success (all parity
// checks satisfied) and iterations valid until the next start. pgab_mode shows
// the current VNU mode. Decoding a frame of k iterations thus costs 2k+2
// cycles; the RNG fill is paid once after reset.
//
// The node functions, two-cycle iteration, switch at iteration 15, p_v = 0.2
// and the 32-bit LFSR follow the PGaB decoder architecture. The H matrix
// shifts, IMAX = 300 (the iteration limit used in the algorithm's simulations),
// the frame handshake, the parallel I/O and the LFSR polynomial and seed are
// this design's choices.
module pgab_decoder
  import pgab_pkg::*;
#(
  parameter int unsigned       Z        = 54,    // circulant size
  parameter int unsigned       MB       = 12,    // block-rows of H
  parameter int unsigned       NB       = 24,    // block-columns of H
  parameter int unsigned       DV       = 4,     // variable node degree
  parameter int unsigned       DC       = 8,     // check node degree
  parameter int unsigned       S_I      = 15,    // GaB iterations before PGaB
  parameter int unsigned       IMAX     = 300,   // iteration limit
  parameter logic [LFSR_W-1:0] RNG_SEED = LFSR_SEED_DEFAULT,
  parameter logic [LFSR_W-1:0] PV_TH    = PV_THRESHOLD_DEFAULT,
  localparam int unsigned      N        = NB * Z,
  localparam int unsigned      M        = MB * Z,
  localparam int unsigned      IW       = $clog2(IMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  r_in,
  output logic          ready,
  output logic          done,
  output logic          success,
  output logic [IW-1:0] iterations,
  output logic          pgab_mode,
  output logic [N-1:0]  d_out
);

  logic load, cnu_en, vnu_en, ctrl, rng_step, rng_ready, converged;

  logic [N-1:0]    r_q, d_q, d_nxt, p;
  logic [N*DV-1:0] v_q, c_q, v_nxt, c_nxt;
  logic [M-1:0]    s;

  // ---------------------------------------------------------------- control
  pgab_controller #(.IMAX(IMAX), .S_I(S_I)) u_ctrl (
    .clk, .rst_n, .start, .rng_ready, .converged,
    .ready, .load, .cnu_en, .vnu_en, .ctrl, .rng_step,
    .done, .success, .iterations
  );

  lfsr_rng #(.N(N), .SEED(RNG_SEED), .THRESH(PV_TH)) u_rng (
    .clk, .rst_n, .step(rng_step), .ready(rng_ready), .p
  );

  // ---------------------------------------------------------------- VNUs
  for (genvar n = 0; n < N; n++) begin : g_vnu
    pgab_vnu #(.DV(DV)) u_vnu (
      .r    (r_q[n]),
      .p    (p[n]),
      .ctrl (ctrl),
      .c    (c_q[n*DV +: DV]),
      .v    (v_nxt[n*DV +: DV]),
      .d    (d_nxt[n])
    );
  end

  // ---------------------------------------------------------------- H matrix
  logic [M*DC-1:0] cnu_v, cnu_d, cnu_c;

  qc_hmatrix_net #(.Z(Z), .MB(MB), .NB(NB), .DV(DV), .DC(DC)) u_hnet (
    .v_edge (v_q),
    .d      (d_q),
    .cnu_v  (cnu_v),
    .cnu_d  (cnu_d),
    .cnu_c  (cnu_c),
    .c_edge (c_nxt)
  );

  // ---------------------------------------------------------------- CNUs
  for (genvar m = 0; m < M; m++) begin : g_cnu
    pgab_cnu #(.DC(DC)) u_cnu (
      .v (cnu_v[m*DC +: DC]),
      .d (cnu_d[m*DC +: DC]),
      .c (cnu_c[m*DC +: DC]),
      .s (s[m])
    );
  end

  syndrome_check #(.M(M)) u_syn (.s, .converged);

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (load) begin
      r_q <= r_in;
      d_q <= r_in;
      for (int unsigned n = 0; n < N; n++) v_q[n*DV +: DV] <= {DV{r_in[n]}};
    end else if (vnu_en) begin
      v_q <= v_nxt;
      d_q <= d_nxt;
    end
    if (cnu_en) c_q <= c_nxt;
  end

  assign pgab_mode = ctrl;
  assign d_out     = d_q;

endmodule
