// tb_pgab_codes: runs the decoder, rebuilt by parameters, on the other
// regular codes the PGaB study uses besides the default rate-1/2 code:
//   Tanner-size code   N = 155,  DV = 3, DC = 5  (Z = 31, 3 x 5 blocks, M = 93)
//   rate-1/2, DV = 3   N = 1296, DV = 3, DC = 6  (Z = 54, 12 x 24 blocks, M = 648)
//   rate-3/4           N = 1296, DV = 4, DC = 16 (Z = 81, 4 x 16 blocks, M = 324)
//   rate-6/7           N = 2212, DV = 4, DC = 28 (Z = 79, 4 x 28 blocks, M = 316)
// Each code gets its own decoder and runner (pgab_code_runner) with frames at a
// crossover probability where the decoder mostly succeeds; every frame is
// compared with the bit-accurate reference. The test fails if a code never
// decodes a frame.
module tb_pgab_codes;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fin [4];
  int   ch [4], fl [4], gok [4], pok [4], lim [4];

  pgab_code_runner #(.Z(31), .MB(3),  .NB(5),  .DV(3), .DC(5),  .FRAMES(60), .ALPHA_PPM(30000)) u_tanner (
    .clk, .rst_n, .finished(fin[0]), .checks(ch[0]), .failures(fl[0]),
    .n_gab_ok(gok[0]), .n_pgab_ok(pok[0]), .n_limit(lim[0]));
  pgab_code_runner #(.Z(54), .MB(12), .NB(24), .DV(3), .DC(6),  .FRAMES(20), .ALPHA_PPM(10000)) u_r12_dv3 (
    .clk, .rst_n, .finished(fin[1]), .checks(ch[1]), .failures(fl[1]),
    .n_gab_ok(gok[1]), .n_pgab_ok(pok[1]), .n_limit(lim[1]));
  pgab_code_runner #(.Z(81), .MB(4),  .NB(16), .DV(4), .DC(16), .FRAMES(20), .ALPHA_PPM(8000)) u_r34 (
    .clk, .rst_n, .finished(fin[2]), .checks(ch[2]), .failures(fl[2]),
    .n_gab_ok(gok[2]), .n_pgab_ok(pok[2]), .n_limit(lim[2]));
  pgab_code_runner #(.Z(79), .MB(4),  .NB(28), .DV(4), .DC(28), .FRAMES(20), .ALPHA_PPM(3000)) u_r67 (
    .clk, .rst_n, .finished(fin[3]), .checks(ch[3]), .failures(fl[3]),
    .n_gab_ok(gok[3]), .n_pgab_ok(pok[3]), .n_limit(lim[3]));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int k = 0; k < 4; k++) begin
      $display("code %0d: checks=%0d failures=%0d gab_converged=%0d pgab_converged=%0d iteration_limit=%0d",
               k, ch[k], fl[k], gok[k], pok[k], lim[k]);
      checks   += ch[k] + 1;
      failures += fl[k];
      if (gok[k] + pok[k] == 0) begin
        failures++;
        $display("FAIL: code %0d decoded no frame", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
