// tb_pgab_fer: frame-error-rate workload on the default decoder (N = 1296,
// rate 1/2), hybrid PGaB against plain Gallager-B.
//
// Two decoders with default sizes receive the same frames: the hybrid one
// (switch to PGaB after 15 iterations) and one whose switch point lies beyond
// the iteration limit, i.e. GaB only. Frames are the all-zero codeword through
// a binary symmetric channel with crossover probability 0.01, in the
// error-floor region where trapping sets dominate GaB failures. For every
// frame the testbench checks that a reported success returned a word that
// satisfies every parity check (tested on the H matrix held by pgab_ref) and
// that latency is 2k+2 cycles. A success on a codeword other than the sent one
// is an undetected error; it counts as a frame error and is reported apart. At the end it checks that the
// hybrid decoder failed on fewer frames and used fewer iterations on average
// than GaB only, and prints both frame error rates, the average iteration
// counts and the resulting throughput per clock (N / (2 * average iterations)
// bits per cycle, the formula used for this decoder's throughput).
module tb_pgab_fer;
  import pgab_ref_pkg::*;

  localparam int N = 1296, IMAX = 300, IW = 9;
  localparam int FRAMES = 20000;
  localparam int ALPHA_PPM = 10000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] r_in = '0, d_h, d_g;
  logic rdy_h, rdy_g, done_h, done_g, ok_h, ok_g, mode_h, mode_g;
  logic [IW-1:0] it_h, it_g;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  pgab_decoder u_hybrid (
    .clk, .rst_n, .start, .r_in, .ready(rdy_h), .done(done_h), .success(ok_h),
    .iterations(it_h), .pgab_mode(mode_h), .d_out(d_h)
  );

  pgab_decoder #(.S_I(IMAX + 1)) u_gab (
    .clk, .rst_n, .start, .r_in, .ready(rdy_g), .done(done_g), .success(ok_g),
    .iterations(it_g), .pgab_mode(mode_g), .d_out(d_g)
  );

  pgab_ref code_h = new();  // used only for its H matrix

  function automatic bit is_codeword(logic [N-1:0] w);
    for (int m = 0; m < $size(code_h.chk_vn); m++) begin
      bit par;
      par = 0;
      foreach (code_h.chk_vn[m][k]) par ^= w[code_h.chk_vn[m][k]];
      if (par) return 0;
    end
    return 1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (60000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int fail_h = 0, fail_g = 0, rescued = 0, lost = 0, switched = 0, und_h = 0, und_g = 0;
    longint sum_h = 0, sum_g = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (!(rdy_h && rdy_g)) @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      logic [N-1:0] rv;
      int t0, lat_h, lat_g;
      bit got_h, got_g;
      for (int n = 0; n < N; n++) rv[n] = ($urandom % 1000000) < ALPHA_PPM;
      @(negedge clk);
      r_in  = rv;
      start = 1;
      @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      start = 0;
      got_h = 0;
      got_g = 0;
      while (!(got_h && got_g)) begin
        @(posedge clk);
        #1;
        if (done_h && !got_h) begin got_h = 1; lat_h = cyc - t0; end
        if (done_g && !got_g) begin got_g = 1; lat_g = cyc - t0; end
      end
      if (ok_h) check(is_codeword(d_h), $sformatf("frame %0d hybrid success on a non-codeword", f));
      if (ok_g) check(is_codeword(d_g), $sformatf("frame %0d GaB success on a non-codeword", f));
      und_h += ok_h && d_h != '0;
      und_g += ok_g && d_g != '0;
      check(lat_h == 2 * int'(it_h) + 2, $sformatf("frame %0d hybrid latency", f));
      check(lat_g == 2 * int'(it_g) + 2, $sformatf("frame %0d GaB latency", f));
      // both run GaB for the first 15 iterations: identical up to there
      if (it_g <= 15 || it_h <= 15)
        check(it_h == it_g && ok_h == ok_g && d_h == d_g, $sformatf("frame %0d differs in GaB phase", f));
      fail_h += !ok_h || d_h != '0;
      fail_g += !ok_g || d_g != '0;
      sum_h  += it_h;
      sum_g  += it_g;
      if (it_h > 15) switched++;
      if (ok_h && d_h == '0 && !(ok_g && d_g == '0)) rescued++;
      if (ok_g && d_g == '0 && !(ok_h && d_h == '0)) lost++;
    end
    $display("alpha=%0d ppm, %0d frames: GaB failed %0d (FER %0d ppm), hybrid PGaB failed %0d (FER %0d ppm)",
             ALPHA_PPM, FRAMES, fail_g, fail_g * 1000000 / FRAMES, fail_h, fail_h * 1000000 / FRAMES);
    $display("undetected errors (success on another codeword): GaB %0d, hybrid %0d", und_g, und_h);
    $display("frames past 15 iterations %0d, rescued by PGaB %0d, lost by PGaB %0d", switched, rescued, lost);
    $display("average iterations x1000: GaB %0d, hybrid %0d; throughput bits/cycle x1000: GaB %0d, hybrid %0d",
             sum_g * 1000 / FRAMES, sum_h * 1000 / FRAMES,
             longint'(N) * 1000 * FRAMES / (2 * sum_g), longint'(N) * 1000 * FRAMES / (2 * sum_h));
    check(fail_g > 0, "GaB never failed: workload too easy");
    check(switched > 0, "no frame reached the PGaB phase");
    check(rescued > 0, "PGaB never rescued a frame");
    check(fail_h < fail_g, "hybrid PGaB did not lower the frame error count");
    check(sum_h < sum_g, "hybrid PGaB did not lower the average iteration count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
