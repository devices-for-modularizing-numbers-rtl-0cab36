// tb_modsq_wide: both devices at a cryptographic-style width, N = 128
// (two-bit device also at odd N = 127). Random moduli with the top bit set
// and random A < P; results are compared with (A*A) mod P computed in
// 256-bit arithmetic, and the start-to-done latencies must be N+1 and
// ceil(N/2)+1 clocks.
module tb_modsq_wide;
  localparam int N  = 128;
  localparam int NO = 127;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic st = 0, b1, d1, b2, d2, bo, dn;
  logic [N-1:0]  a = '0, p = '0, r1, r2;
  logic [NO-1:0] ao = '0, po = '0, ro;

  modsq_1bit #(.N(N))  dut1 (.clk, .rst_n, .start(st), .a_in(a), .p_in(p),
                             .busy(b1), .done(d1), .r_out(r1));
  modsq_2bit #(.N(N))  dut2 (.clk, .rst_n, .start(st), .a_in(a), .p_in(p),
                             .busy(b2), .done(d2), .r_out(r2));
  modsq_2bit #(.N(NO)) dut3 (.clk, .rst_n, .start(st), .a_in(ao), .p_in(po),
                             .busy(bo), .done(dn), .r_out(ro));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_wide();
    logic [N-1:0] v;
    for (int k = 0; k < N / 32; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      logic [2*N-1:0] ref1, refo;
      int lat, lat1, lat2, lato;
      p  = rand_wide() | {1'b1, {(N-1){1'b0}}};
      a  = rand_wide() % p;
      po = NO'(rand_wide()) | {1'b1, {(NO-1){1'b0}}};
      ao = NO'(rand_wide() % {1'b0, po});
      if (t == 0) a = p - 1;
      ref1 = ({{N{1'b0}}, a} * {{N{1'b0}}, a}) % {{N{1'b0}}, p};
      refo = ({{(2*N-NO){1'b0}}, ao} * {{(2*N-NO){1'b0}}, ao}) % {{(2*N-NO){1'b0}}, po};
      @(negedge clk); st = 1;
      @(negedge clk); st = 0;
      lat = 1; lat1 = 0; lat2 = 0; lato = 0;
      while (lat < 3 * N && (lat1 == 0 || lat2 == 0 || lato == 0)) begin
        if (d1 && lat1 == 0) lat1 = lat;
        if (d2 && lat2 == 0) lat2 = lat;
        if (dn && lato == 0) lato = lat;
        @(negedge clk); lat++;
      end
      check(lat1 == N + 1 && lat2 == N / 2 + 1 && lato == (NO + 1) / 2 + 1,
            $sformatf("latencies %0d %0d %0d", lat1, lat2, lato));
      check(r1 == ref1[N-1:0], $sformatf("one-bit device, case %0d", t));
      check(r2 == ref1[N-1:0], $sformatf("two-bit device, case %0d", t));
      check(ro == refo[NO-1:0], $sformatf("two-bit device N=%0d, case %0d", NO, t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
