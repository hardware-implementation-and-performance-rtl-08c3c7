// tb_lfsr_rng: test of the random bit generator with N = 64.
//
// Checks that ready rises exactly N cycles after reset, that the shift register
// then holds the bits of an independent LFSR + comparator model, that step
// advances it by exactly one bit, that it holds when step is low, and that the
// fraction of ones over 20000 draws is close to p_v = 0.2.
module tb_lfsr_rng;

  localparam int N = 64;
  localparam bit [31:0] SEED = 32'h1D87_2B41;
  localparam bit [31:0] TH   = 32'h3333_3333;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, ready;
  logic [N-1:0] p;
  bit [31:0] lfsr_m;
  bit [N-1:0] p_m;

  always #5 clk = ~clk;

  lfsr_rng #(.N(N), .SEED(SEED), .THRESH(TH)) dut (.clk, .rst_n, .step, .ready, .p);

  function automatic void model_draw();
    p_m    = {p_m[N-2:0], lfsr_m < TH};
    lfsr_m = {lfsr_m[30:0], lfsr_m[31] ^ lfsr_m[21] ^ lfsr_m[1] ^ lfsr_m[0]};
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, ones;
    lfsr_m = SEED;
    p_m    = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!ready, "ready low right after reset");
    cyc = 0;
    while (!ready) begin
      @(posedge clk);
      #1 cyc++;
      model_draw();
    end
    check(cyc == N, $sformatf("fill took %0d cycles", cyc));
    check(p == p_m, "register after fill");
    repeat (5) @(posedge clk);
    #1 check(p == p_m, "register holds without step");
    for (int t = 0; t < 300; t++) begin
      step = ($urandom % 3) != 0;
      @(posedge clk);
      #1 if (step) model_draw();
      check(p == p_m, $sformatf("register after step %0d", t));
    end
    step = 1;
    ones = 0;
    for (int t = 0; t < 20000; t++) begin
      @(posedge clk);
      #1 ones += p[0];
    end
    step = 0;
    $display("fraction of ones: %0d / 20000", ones);
    check(ones > 3600 && ones < 4400, $sformatf("p_v estimate %0d/20000", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
