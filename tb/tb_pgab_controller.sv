// tb_pgab_controller: test of the decoder state machine with IMAX = 30 and
// S_I = 5, using a scripted converged input.
//
// For each frame the testbench chooses the iteration after which converged is
// raised (or never, to reach IMAX), then follows the two-cycle schedule: it
// checks that cnu_en and vnu_en alternate, that ctrl is 0 for the first S_I
// iterations and 1 afterwards, that rng_step occurs exactly in PGaB variable
// node cycles, that done comes 2k+2 cycles after start with the right success
// flag and iteration count, and that nothing starts before rng_ready.
module tb_pgab_controller;

  localparam int IMAX = 30, S_I = 5;
  localparam int IW = $clog2(IMAX + 1);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, rng_ready = 0, converged = 0;
  logic ready, load, cnu_en, vnu_en, ctrl, rng_step, done, success;
  logic [IW-1:0] iterations;

  always #5 clk = ~clk;

  pgab_controller #(.IMAX(IMAX), .S_I(S_I)) dut (
    .clk, .rst_n, .start, .rng_ready, .converged, .ready, .load, .cnu_en,
    .vnu_en, .ctrl, .rng_step, .done, .success, .iterations
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int target;      // iteration count at which converged is raised, -1: never
  int it_seen;     // VNU cycles seen in the current frame
  int n_steps;

  // converged follows the scripted target, combinationally on the count
  always_comb converged = (target >= 0) && (it_seen >= target) && cnu_en;

  initial begin
    static int targets [8] = '{0, 1, 3, 5, 6, 12, -1, 29};
    target = -1;
    it_seen = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    start = 1;  // requested too early: must be ignored while filling
    repeat (10) begin
      @(posedge clk);
      #1 check(!ready && !load && !cnu_en, "idle during RNG fill");
    end
    start = 0;
    rng_ready = 1;
    @(posedge clk);
    #1 check(ready, "ready after fill");
    foreach (targets[f]) begin
      int cyc, exp_it;
      bit exp_ok;
      target  = targets[f];
      it_seen = 0;
      n_steps = 0;
      exp_ok  = target >= 0;
      exp_it  = exp_ok ? target : IMAX;
      start = 1;
      #1 check(load, "load with start");
      @(posedge clk);
      #1 start = 0;
      cyc = 1;
      while (!done) begin
        bit was_vnu;
        was_vnu = vnu_en;
        check(!(cnu_en && vnu_en), "phases exclusive");
        if (vnu_en) begin
          check(ctrl == (it_seen >= S_I), $sformatf("ctrl in iteration %0d", it_seen));
          check(rng_step == ctrl, "rng_step in VNU cycle");
          if (rng_step) n_steps++;
        end else begin
          check(!rng_step, "rng_step only in VNU cycle");
        end
        @(posedge clk);
        #1 cyc++;
        if (was_vnu) it_seen++;
        if (cyc > 200) break;
      end
      check(cyc == 2 * exp_it + 2, $sformatf("frame %0d latency %0d expected %0d", f, cyc, 2 * exp_it + 2));
      check(success == exp_ok, $sformatf("frame %0d success", f));
      check(int'(iterations) == exp_it, $sformatf("frame %0d iterations %0d", f, iterations));
      check(n_steps == (exp_it > S_I ? exp_it - S_I : 0), $sformatf("frame %0d rng steps %0d", f, n_steps));
      check(ready, "ready after done");
      @(posedge clk);
      #1 check(!done, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
