// tb_syndrome_check: test of the compute-syndrome unit at the default M = 648:
// all-zero syndrome, every single unsatisfied check, and random patterns.
module tb_syndrome_check;

  int checks = 0, failures = 0;
  localparam int M = 648;
  logic [M-1:0] s;
  logic converged;

  syndrome_check #(.M(M)) dut (.s, .converged);

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

  initial begin
    s = '0;
    #1 check(converged == 1, "all checks satisfied");
    for (int m = 0; m < M; m++) begin
      s = '0;
      s[m] = 1;
      #1 check(converged == 0, $sformatf("check %0d unsatisfied", m));
    end
    for (int t = 0; t < 200; t++) begin
      bit any;
      any = 0;
      for (int m = 0; m < M; m++) begin
        s[m] = ($urandom % 400) == 0;
        any |= s[m];
      end
      #1 check(converged == !any, "random syndrome");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
