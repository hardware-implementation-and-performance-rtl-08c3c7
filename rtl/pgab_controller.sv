// pgab_controller: state machine of the hybrid GaB / PGaB decoder.
//
// After reset it waits (ST_FILL) until the random bit register is full, then
// idles (ST_IDLE, ready = 1). A start pulse loads the frame (load = 1): every
// variable-to-check message and the decision word take the received bits and
// the iteration count is cleared. Decoding then alternates two cycles per
// iteration:
//   ST_CNU  check nodes compute c from v (cnu_en); the syndrome of the current
//           decision word is tested. All checks satisfied ends the frame with
//           success; reaching IMAX iterations ends it with failure.
//   ST_VNU  variable nodes compute v and d from c (vnu_en); the iteration
//           count increments.
// The mode bit ctrl is 0 for the first S_I iterations (plain Gallager-B) and 1
// afterwards (PGaB); rng_step is high in every PGaB variable node cycle, so one
// new random bit is drawn per PGaB iteration. done is a one-cycle pulse, one
// cycle after the final ST_CNU cycle; success and iterations are held until the
// next frame. A frame that converges after k iterations takes 2k+2 cycles from
// the start cycle to the done pulse.
//
// The switch point, the two-cycle iteration and the stopping rule follow the
// PGaB decoder; the start/done handshake is this design's own.
module pgab_controller
  import pgab_pkg::*;
#(
  parameter int unsigned IMAX = 300,  // maximum number of iterations
  parameter int unsigned S_I  = 15,   // iterations of plain GaB before PGaB
  localparam int unsigned IW  = $clog2(IMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // frame present on r_in (honoured when ready)
  input  logic          rng_ready,
  input  logic          converged,   // all checks satisfied by d
  output logic          ready,       // idle, may take a frame
  output logic          load,        // capture frame into r, v and d registers
  output logic          cnu_en,      // register CNU outputs
  output logic          vnu_en,      // register VNU outputs
  output logic          ctrl,        // 1 = PGaB mode
  output logic          rng_step,    // draw one new random bit
  output logic          done,        // frame finished (pulse)
  output logic          success,     // last frame converged
  output logic [IW-1:0] iterations   // iterations used by the last frame
);

  dec_state_e      state_q, state_d;
  logic [IW-1:0]   iter_q;
  logic            finish_ok, finish_fail;

  assign ready    = (state_q == ST_IDLE);
  assign load     = ready && start;
  assign cnu_en   = (state_q == ST_CNU);
  assign vnu_en   = (state_q == ST_VNU);
  assign ctrl     = (iter_q >= IW'(S_I));
  assign rng_step = vnu_en && ctrl;

  assign finish_ok   = cnu_en && converged;
  assign finish_fail = cnu_en && !converged && (iter_q == IW'(IMAX));

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_FILL: if (rng_ready) state_d = ST_IDLE;
      ST_IDLE: if (start) state_d = ST_CNU;
      ST_CNU:  state_d = (finish_ok || finish_fail) ? ST_IDLE : ST_VNU;
      ST_VNU:  state_d = ST_CNU;
      default: state_d = ST_FILL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_FILL;
      iter_q     <= '0;
      done       <= 1'b0;
      success    <= 1'b0;
      iterations <= '0;
    end else begin
      state_q <= state_d;
      done    <= finish_ok || finish_fail;
      if (load) iter_q <= '0;
      else if (vnu_en) iter_q <= iter_q + 1'b1;
      if (finish_ok || finish_fail) begin
        success    <= finish_ok;
        iterations <= iter_q;
      end
    end
  end

  // The iteration counter never passes IMAX.
  a_iter_bound: assert property (@(posedge clk) disable iff (!rst_n) iter_q <= IW'(IMAX));
  // Phases strictly alternate while decoding.
  a_vnu_after_cnu: assert property (@(posedge clk) disable iff (!rst_n)
                                    vnu_en |=> (state_q == ST_CNU));

endmodule
