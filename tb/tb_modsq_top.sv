// tb_modsq_top: end-to-end test of both modular squaring devices with every
// parameter at its default (N = 8).
//  * The two worked examples, 43^2 mod 54 = 13 and 59^2 mod 65 = 36, on both
//    devices.
//  * Random A < P on both devices at once, each with its own operands and
//    start times, results against (A*A) mod P, latencies N+1 and N/2+1.
//  * A start pulse during a run, which must be ignored.
// It counts how often each mechanism occurred: each of the three shaper
// outcomes (no subtraction, subtract P, subtract 2P) in every shaper, End of
// operation on each device and an ignored start; any that never occurs is a
// failure.
module tb_modsq_top;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic start1 = 0, start2 = 0;
  logic [N-1:0] a1 = '0, p1 = '0, a2 = '0, p2 = '0, r1, r2;
  logic busy1, done1, busy2, done2;
  int checks = 0, failures = 0;

  modsq_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int sub1[3] = '{0, 0, 0}, subm[3] = '{0, 0, 0}, subf[3] = '{0, 0, 0};
  int ends1 = 0, ends2 = 0, ignored1 = 0, ignored2 = 0, overlap = 0;

  // sampled just before each rising edge, after the testbench has driven
  // its inputs at the falling edge
  always @(negedge clk) begin
    #4;
    if (rst_n) begin
    if (busy1) sub1[dut.u_dev1.g_prf.u_prf.sub_mult]++;
    if (busy2) begin
      subm[dut.u_dev2.u_prf1.sub_mult]++;
      subf[dut.u_dev2.u_prf2.sub_mult]++;
    end
    if (done1) ends1++;
    if (done2) ends2++;
    if (start1 && busy1) ignored1++;
    if (start2 && busy2) ignored2++;
    if (busy1 && busy2) overlap++;
    end
  end

  // one operation on device 1: start, optional stray start, wait for done
  task automatic op1(input int aa, input int pp, input bit poke);
    int lat;
    @(negedge clk); a1 = N'(aa); p1 = N'(pp); start1 = 1;
    @(negedge clk); start1 = 0; a1 = '0; p1 = N'($urandom) | N'(1);
    lat = 1;
    while (!done1 && lat < 40) begin
      @(negedge clk); lat++;
      if (poke && lat == 3) start1 = 1; else start1 = 0;
    end
    start1 = 0;
    check(lat == N + 1, $sformatf("dev1 latency %0d", lat));
    check(int'(r1) == (aa * aa) % pp,
          $sformatf("dev1 %0d^2 mod %0d = %0d, got %0d", aa, pp, (aa * aa) % pp, r1));
  endtask

  task automatic op2(input int aa, input int pp, input bit poke);
    int lat;
    @(negedge clk); a2 = N'(aa); p2 = N'(pp); start2 = 1;
    @(negedge clk); start2 = 0; a2 = '0; p2 = N'($urandom) | N'(1);
    lat = 1;
    while (!done2 && lat < 40) begin
      @(negedge clk); lat++;
      if (poke && lat == 2) start2 = 1; else start2 = 0;
    end
    start2 = 0;
    check(lat == N / 2 + 1, $sformatf("dev2 latency %0d", lat));
    check(int'(r2) == (aa * aa) % pp,
          $sformatf("dev2 %0d^2 mod %0d = %0d, got %0d", aa, pp, (aa * aa) % pp, r2));
  endtask

  function automatic int rand_p();
    return 1 + $urandom % ((1 << N) - 1);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // worked examples
    op1(43, 54, 1'b0);
    check(int'(r1) == 13, "43^2 mod 54 on dev1");
    op2(43, 54, 1'b0);
    op1(59, 65, 1'b0);
    op2(59, 65, 1'b0);
    check(int'(r2) == 36, "59^2 mod 65 on dev2");

    // both devices concurrently with random operands
    fork
      for (int k = 0; k < 400; k++) begin
        automatic int pp = rand_p();
        op1($urandom % pp, pp, k % 50 == 3);
      end
      for (int k = 0; k < 700; k++) begin
        automatic int pp = rand_p();
        op2($urandom % pp, pp, k % 50 == 7);
      end
    join
    repeat (2) @(negedge clk);

    for (int m = 0; m < 3; m++) begin
      check(sub1[m] > 0, $sformatf("dev1 shaper outcome %0d never seen", m));
      check(subm[m] > 0, $sformatf("dev2 first shaper outcome %0d never seen", m));
      check(subf[m] > 0, $sformatf("dev2 second shaper outcome %0d never seen", m));
    end
    check(ends1 == 402, $sformatf("dev1 end-of-operation count %0d", ends1));
    check(ends2 == 702, $sformatf("dev2 end-of-operation count %0d", ends2));
    check(ignored1 > 0 && ignored2 > 0, "start during a run never exercised");
    check(overlap > 0, "devices never ran concurrently");
    $display("dev1 shaper outcomes: S<P %0d, -P %0d, -2P %0d", sub1[0], sub1[1], sub1[2]);
    $display("dev2 shaper 1 outcomes: %0d %0d %0d, shaper 2: %0d %0d %0d",
             subm[0], subm[1], subm[2], subf[0], subf[1], subf[2]);
    $display("ends %0d/%0d, ignored starts %0d/%0d, overlapping cycles %0d",
             ends1, ends2, ignored1, ignored2, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
