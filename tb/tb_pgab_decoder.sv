// tb_pgab_decoder: end-to-end test of the hybrid GaB/PGaB decoder on a reduced
// code (the default 12 x 24 base matrix with Z = 17: N = 408, M = 204,
// DV = 4, DC = 8) with IMAX = 100.
//
// Frames are the all-zero codeword sent through a binary symmetric channel at
// several crossover probabilities (the decoder's node rules are symmetric, so
// the all-zero word stands for any codeword). Every frame is decoded by the
// RTL and by the bit-accurate reference in pgab_ref_pkg; decided word, success
// flag and iteration count must agree, and the latency must be 2 cycles per
// iteration plus 2. The test counts the mechanisms the decoder has (RNG fill
// after reset, convergence in the GaB phase, switch to PGaB, convergence in the
// PGaB phase, stop at the iteration limit, frames already valid on arrival) and fails if one never happened.
module tb_pgab_decoder;
  import pgab_ref_pkg::*;

  localparam int Z = 17, MB = 12, NB = 24, DV = 4, DC = 8, S_I = 15, IMAX = 100;
  localparam int N = NB * Z;
  localparam int IW = $clog2(IMAX + 1);
  localparam int FRAMES = 800;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] r_in = '0, d_out;
  logic ready, done, success, pgab_mode;
  logic [IW-1:0] iterations;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_fill = 0, n_gab_ok = 0, n_switch = 0, n_pgab_ok = 0, n_limit = 0,
      n_zero_iter = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  pgab_decoder #(.Z(Z), .MB(MB), .NB(NB), .DV(DV), .DC(DC), .S_I(S_I), .IMAX(IMAX)) dut (
    .clk, .rst_n, .start, .r_in, .ready, .done, .success, .iterations,
    .pgab_mode, .d_out
  );

  pgab_ref #(.Z(Z), .MB(MB), .NB(NB), .DV(DV), .DC(DC), .S_I(S_I), .IMAX(IMAX)) ref_m;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit saw_mode;
  always @(posedge clk) if (pgab_mode) saw_mode <= 1;

  initial begin : main
    bit r [N], d_ref [N];
    bit ok_ref;
    int it_ref, t0, lat, fill_cycles;
    static int alpha_ppm [5] = '{20000, 50000, 60000, 70000, 80000};

    ref_m = new();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    t0 = cyc;
    @(posedge clk);
    while (!ready) @(posedge clk);
    fill_cycles = cyc - t0;
    check(fill_cycles >= N && fill_cycles <= N + 3, $sformatf("RNG fill took %0d cycles", fill_cycles));
    n_fill++;

    for (int f = 0; f < FRAMES; f++) begin
      logic [N-1:0] rv;
      int a;
      a = (f == 0) ? 0 : alpha_ppm[f % 5];
      for (int n = 0; n < N; n++) begin
        r[n]  = ($urandom % 1000000) < a;
        rv[n] = r[n];
      end
      ref_m.decode(r, d_ref, ok_ref, it_ref);
      @(negedge clk);
      r_in  = rv;
      start = 1;
      @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      start = 0;
      saw_mode = 0;
      while (!done) @(posedge clk);
      lat = cyc - t0;
      #1;
      begin
        bit same;
        same = 1;
        for (int n = 0; n < N; n++) if (d_out[n] !== d_ref[n]) same = 0;
        check(same, $sformatf("frame %0d decided word differs", f));
      end
      check(success == ok_ref, $sformatf("frame %0d success %0d ref %0d", f, success, ok_ref));
      check(int'(iterations) == it_ref, $sformatf("frame %0d iterations %0d ref %0d", f, iterations, it_ref));
      check(lat == 2 * it_ref + 2, $sformatf("frame %0d latency %0d for %0d iterations", f, lat, it_ref));
      check(saw_mode == (it_ref >= S_I), $sformatf("frame %0d PGaB mode seen %0d", f, saw_mode));
      if (ok_ref && it_ref == 0) n_zero_iter++;
      if (ok_ref && it_ref <= S_I) n_gab_ok++;
      if (it_ref > S_I) n_switch++;
      if (ok_ref && it_ref > S_I) n_pgab_ok++;
      if (!ok_ref) n_limit++;
    end
    $display("mechanisms: fill=%0d gab_converged=%0d switched_to_pgab=%0d pgab_converged=%0d iteration_limit=%0d no_error_frames=%0d  random_draws=%0d",
             n_fill, n_gab_ok, n_switch, n_pgab_ok, n_limit, n_zero_iter, ref_m.steps);
    check(n_fill > 0, "RNG fill never happened");
    check(n_gab_ok > 0, "no frame converged in GaB phase");
    check(n_switch > 0, "decoder never switched to PGaB");
    check(n_pgab_ok > 0, "no frame converged in PGaB phase");
    check(n_limit > 0, "iteration limit never reached");
    check(n_zero_iter > 0, "no frame valid on arrival");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
