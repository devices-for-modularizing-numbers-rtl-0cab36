// tb_prf_v1: exhaustive test of the partial residue shaper (variant 1)
// for 6-bit moduli: every P from 1 to 63 and every partial sum S below 3P.
// The result must equal S mod P and sub_mult must equal S / P. A random
// pass at the default 8-bit width follows.
module tb_prf_v1;
  logic [7:0] s6;
  logic [5:0] p6, r6;
  logic [1:0] m6, m8;
  logic [9:0] s8;
  logic [7:0] p8, r8;
  int checks = 0, failures = 0;

  prf_v1 #(.N(6)) dut6 (.s(s6), .p(p6), .r(r6), .sub_mult(m6));
  prf_v1          dut8 (.s(s8), .p(p8), .r(r8), .sub_mult(m8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 1; p < 64; p++)
      for (int s = 0; s < 3 * p; s++) begin
        s6 = 8'(s); p6 = 6'(p);
        #1;
        checks++;
        if (int'(r6) != s % p || int'(m6) != s / p) begin
          failures++;
          $display("N=6 s=%0d p=%0d r=%0d m=%0d", s, p, r6, m6);
        end
      end
    for (int i = 0; i < 5000; i++) begin
      int p, s;
      p = 1 + $urandom % 255;
      s = $urandom % (3 * p);
      s8 = 10'(s); p8 = 8'(p);
      #1;
      checks++;
      if (int'(r8) != s % p || int'(m8) != s / p) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
