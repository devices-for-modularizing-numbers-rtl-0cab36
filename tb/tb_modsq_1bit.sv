// tb_modsq_1bit: self-checking test of the one-bit-per-clock modular
// squaring device.
//  * Worked example 43^2 mod 54 on a 6-bit device: the residue register must
//    step through 43, 32, 53, 52, 39, 13, one value per clock.
//  * The same example on the default 8-bit device (two leading zero digits
//    give R = 0 first).
//  * Random A < P at the default width with both shaper variants; results
//    are compared with (A*A) mod P, and start-to-done latency must be N+1.
module tb_modsq_1bit;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // 6-bit device, variant 1
  logic       st6 = 0, busy6, done6;
  logic [5:0] a6 = '0, p6 = '0, r6;
  modsq_1bit #(.N(6)) dut6 (.clk, .rst_n, .start(st6), .a_in(a6), .p_in(p6),
                            .busy(busy6), .done(done6), .r_out(r6));

  // default device, variant 1 and variant 2
  logic       st = 0, busy_a, done_a, busy_b, done_b;
  logic [7:0] a = '0, p = '0, r_a, r_b;
  modsq_1bit                     dut_a (.clk, .rst_n, .start(st), .a_in(a), .p_in(p),
                                        .busy(busy_a), .done(done_a), .r_out(r_a));
  modsq_1bit #(.PRF_VARIANT(2))  dut_b (.clk, .rst_n, .start(st), .a_in(a), .p_in(p),
                                        .busy(busy_b), .done(done_b), .r_out(r_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int trace6[6] = '{43, 32, 53, 52, 39, 13};
    int trace8[8] = '{0, 0, 43, 32, 53, 52, 39, 13};
    repeat (2) @(posedge clk);
    rst_n = 1;

    // worked example, 6-bit device
    @(negedge clk); a6 = 43; p6 = 54; st6 = 1;
    @(negedge clk); st6 = 0;
    for (int i = 0; i < 6; i++) begin
      check(busy6, "6-bit busy during steps");
      @(negedge clk);
      check(int'(r6) == trace6[i], $sformatf("6-bit trace step %0d r=%0d", i, r6));
    end
    check(done6 && !busy6, "6-bit done after 6 steps");
    @(negedge clk);
    check(!done6, "6-bit done is one pulse");
    check(int'(r6) == 13, "6-bit result held");

    // worked example, default device
    @(negedge clk); a = 43; p = 54; st = 1;
    @(negedge clk); st = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      check(int'(r_a) == trace8[i], $sformatf("8-bit v1 trace step %0d", i));
      check(int'(r_b) == trace8[i], $sformatf("8-bit v2 trace step %0d", i));
    end
    check(done_a && done_b, "8-bit done after 8 steps");

    // random operands
    for (int k = 0; k < 300; k++) begin
      int pp, aa, lat, expect_r;
      pp = 1 + $urandom % 255;
      if (k % 10 == 0) pp = 255;
      aa = $urandom % pp;
      if (k % 7 == 0) aa = pp - 1;
      expect_r = (aa * aa) % pp;
      @(negedge clk); a = 8'(aa); p = 8'(pp); st = 1;
      @(negedge clk); st = 0; a = 8'($urandom); p = 8'($urandom);
      lat = 1;
      while (!done_a && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 9, $sformatf("latency %0d", lat));
      check(done_b, "variants finish together");
      check(int'(r_a) == expect_r,
            $sformatf("v1 %0d^2 mod %0d = %0d, got %0d", aa, pp, expect_r, r_a));
      check(int'(r_b) == expect_r,
            $sformatf("v2 %0d^2 mod %0d = %0d, got %0d", aa, pp, expect_r, r_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
