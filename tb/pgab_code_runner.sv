// pgab_code_runner: drives one decoder instance, built for the code given by
// (Z, MB, NB, DV, DC), with FRAMES noisy all-zero frames at crossover probability
// ALPHA_PPM / 10^6 and compares every result (decided word, success,
// iteration count, latency 2k+2) with the pgab_ref reference. Used by
// tb_pgab_codes to run several codes side by side; reports its counts on ports.
module pgab_code_runner #(
  parameter int Z         = 31,
  parameter int MB        = 3,
  parameter int NB        = 5,
  parameter int DV        = 3,
  parameter int DC        = 5,
  parameter int IMAX      = 300,
  parameter int FRAMES    = 20,
  parameter int ALPHA_PPM = 20000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_gab_ok,
  output int   n_pgab_ok,
  output int   n_limit
);
  import pgab_ref_pkg::*;

  localparam int N  = NB * Z;
  localparam int IW = $clog2(IMAX + 1);
  localparam int S_I = 15;

  logic start = 0, ready, done, success, pgab_mode;
  logic [N-1:0] r_in = '0, d_out;
  logic [IW-1:0] iterations;

  pgab_decoder #(.Z(Z), .MB(MB), .NB(NB), .DV(DV), .DC(DC), .S_I(S_I), .IMAX(IMAX)) dut (
    .clk, .rst_n, .start, .r_in, .ready, .done, .success, .iterations,
    .pgab_mode, .d_out
  );

  pgab_ref #(.Z(Z), .MB(MB), .NB(NB), .DV(DV), .DC(DC), .S_I(S_I), .IMAX(IMAX)) ref_m;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (Z=%0d DV=%0d DC=%0d): %s", Z, DV, DC, what);
    end
  endtask

  initial begin
    bit r [N], d_ref [N];
    bit ok_ref;
    int it_ref, lat;
    finished = 0;
    checks = 0; failures = 0; n_gab_ok = 0; n_pgab_ok = 0; n_limit = 0;
    ref_m = new();
    wait (rst_n);
    @(posedge clk);
    while (!ready) @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      logic [N-1:0] rv;
      for (int n = 0; n < N; n++) begin
        r[n]  = ($urandom % 1000000) < ALPHA_PPM;
        rv[n] = r[n];
      end
      ref_m.decode(r, d_ref, ok_ref, it_ref);
      @(negedge clk);
      r_in  = rv;
      start = 1;
      @(posedge clk);
      #1 start = 0;
      lat = 1;
      while (!done) begin
        @(posedge clk);
        #1 lat++;
      end
      begin
        bit same;
        same = 1;
        for (int n = 0; n < N; n++) if (d_out[n] !== d_ref[n]) same = 0;
        check(same, $sformatf("frame %0d decided word", f));
      end
      check(success == ok_ref, $sformatf("frame %0d success", f));
      check(int'(iterations) == it_ref, $sformatf("frame %0d iterations %0d ref %0d", f, iterations, it_ref));
      check(lat == 2 * it_ref + 2, $sformatf("frame %0d latency %0d", f, lat));
      if (ok_ref && it_ref <= S_I) n_gab_ok++;
      if (ok_ref && it_ref > S_I) n_pgab_ok++;
      if (!ok_ref) n_limit++;
    end
    finished = 1;
  end
endmodule
