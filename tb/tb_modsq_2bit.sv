// tb_modsq_2bit: self-checking test of the two-bits-per-clock modular
// squaring device.
//  * Worked example 59^2 mod 65 at the default width (A enters as
//    00 11 10 11): per clock the first shaper must give r = 0, 59, 23, 21
//    and the residue register R = 0, 47, 46, 36.
//  * Random A < P at the default width and on a 7-bit device (odd width,
//    leading zero padding); results against (A*A) mod P, and the
//    start-to-done latency must be ceil(N/2)+1.
module tb_modsq_2bit;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic       st = 0, busy, done;
  logic [7:0] a = '0, p = '0, r;
  modsq_2bit dut (.clk, .rst_n, .start(st), .a_in(a), .p_in(p),
                  .busy, .done, .r_out(r));

  logic       st7 = 0, busy7, done7;
  logic [6:0] a7 = '0, p7 = '0, r7;
  modsq_2bit #(.N(7)) dut7 (.clk, .rst_n, .start(st7), .a_in(a7), .p_in(p7),
                            .busy(busy7), .done(done7), .r_out(r7));

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
    int rmid[4] = '{0, 59, 23, 21};
    int rres[4] = '{0, 47, 46, 36};
    repeat (2) @(posedge clk);
    rst_n = 1;

    @(negedge clk); a = 59; p = 65; st = 1;
    @(negedge clk); st = 0;
    for (int i = 0; i < 4; i++) begin
      check(busy, "busy during steps");
      check(int'(dut.r_mid) == rmid[i], $sformatf("r step %0d = %0d", i, dut.r_mid));
      @(negedge clk);
      check(int'(r) == rres[i], $sformatf("R step %0d = %0d", i, r));
    end
    check(done && !busy, "done after 4 steps");
    @(negedge clk);
    check(!done && int'(r) == 36, "one done pulse, result held");

    for (int k = 0; k < 300; k++) begin
      int pp, aa, lat;
      pp = 1 + $urandom % 255;
      if (k % 10 == 0) pp = 255;
      aa = $urandom % pp;
      if (k % 7 == 0) aa = pp - 1;
      @(negedge clk); a = 8'(aa); p = 8'(pp); st = 1;
      @(negedge clk); st = 0; a = 8'($urandom); p = 8'($urandom);
      lat = 1;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 5, $sformatf("latency %0d", lat));
      check(int'(r) == (aa * aa) % pp,
            $sformatf("%0d^2 mod %0d = %0d, got %0d", aa, pp, (aa * aa) % pp, r));
    end

    for (int k = 0; k < 200; k++) begin
      int pp, aa, lat;
      pp = 1 + $urandom % 127;
      aa = $urandom % pp;
      if (k % 5 == 0) aa = pp - 1;
      @(negedge clk); a7 = 7'(aa); p7 = 7'(pp); st7 = 1;
      @(negedge clk); st7 = 0;
      lat = 1;
      while (!done7 && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 5, $sformatf("7-bit latency %0d", lat));
      check(int'(r7) == (aa * aa) % pp,
            $sformatf("7-bit %0d^2 mod %0d, got %0d", aa, pp, r7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
