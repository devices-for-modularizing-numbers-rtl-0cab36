// tb_partial_sum_adder: checks S = 2R + a*A exhaustively for 5-bit
// operands and with random operands at the default 8-bit width, against
// integer arithmetic in the testbench.
module tb_partial_sum_adder;
  logic [4:0] r5, a5;
  logic       d5, d8;
  logic [6:0] s5;
  logic [7:0] r8, a8;
  logic [9:0] s8;
  int checks = 0, failures = 0;

  partial_sum_adder #(.N(5)) dut5 (.r(r5), .a(a5), .digit(d5), .s(s5));
  partial_sum_adder          dut8 (.r(r8), .a(a8), .digit(d8), .s(s8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++)
      for (int a = 0; a < 32; a++)
        for (int d = 0; d < 2; d++) begin
          r5 = 5'(r); a5 = 5'(a); d5 = 1'(d);
          #1;
          checks++;
          if (int'(s5) != 2 * r + d * a) begin
            failures++;
            $display("N=5 r=%0d a=%0d d=%0d s=%0d", r, a, d, s5);
          end
        end
    for (int i = 0; i < 2000; i++) begin
      int r, a, d;
      r = $urandom % 256; a = $urandom % 256; d = $urandom % 2;
      r8 = 8'(r); a8 = 8'(a); d8 = 1'(d);
      #1;
      checks++;
      if (int'(s8) != 2 * r + d * a) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
