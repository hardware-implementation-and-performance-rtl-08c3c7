// tb_pgab_cnu: exhaustive test of the check node unit for DC = 8 (all 256
// message patterns, each with a random decision pattern) plus random tests for
// DC = 28. Expected extrinsic messages and parity are computed bit by bit in
// the testbench.
module tb_pgab_cnu;

  int checks = 0, failures = 0;

  logic [7:0]  v8, d8, c8;    logic s8;
  logic [27:0] v28, d28, c28; logic s28;

  pgab_cnu #(.DC(8))  u8  (.v(v8),  .d(d8),  .c(c8),  .s(s8));
  pgab_cnu #(.DC(28)) u28 (.v(v28), .d(d28), .c(c28), .s(s28));

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
    for (int x = 0; x < 256; x++) begin
      bit par;
      v8 = x[7:0];
      d8 = 8'($urandom);
      #1;
      for (int k = 0; k < 8; k++) begin
        bit e;
        e = 0;
        for (int j = 0; j < 8; j++) if (j != k) e ^= v8[j];
        check(c8[k] == e, $sformatf("DC8 v=%b edge %0d", v8, k));
      end
      par = 0;
      for (int j = 0; j < 8; j++) par ^= d8[j];
      check(s8 == par, $sformatf("DC8 d=%b parity", d8));
    end
    for (int t = 0; t < 500; t++) begin
      bit par;
      v28 = 28'($urandom);
      d28 = 28'($urandom);
      #1;
      for (int k = 0; k < 28; k++) begin
        bit e;
        e = 0;
        for (int j = 0; j < 28; j++) if (j != k) e ^= v28[j];
        check(c28[k] == e, $sformatf("DC28 v=%h edge %0d", v28, k));
      end
      par = 0;
      for (int j = 0; j < 28; j++) par ^= d28[j];
      check(s28 == par, "DC28 parity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
