// tb_shift_reg_left: self-checking test of the multiplier register RgA2 in
// its one-bit (W=8) and two-bit (W=8, SHIFT=2) forms. Loads random values,
// shifts them out and checks the register and its top digit(s) against a
// model after every clock.
module tb_shift_reg_left;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [W-1:0] d = '0, q1, q2, m1, m2;
  logic       dig1;
  logic [1:0] dig2;
  int checks = 0, failures = 0;

  shift_reg_left #(.W(W), .SHIFT(1)) dut1 (
    .clk, .rst_n, .load, .shift, .d, .q(q1), .digits(dig1));
  shift_reg_left #(.W(W), .SHIFT(2)) dut2 (
    .clk, .rst_n, .load, .shift, .d, .q(q2), .digits(dig2));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m1 = '0; m2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      load  = ($urandom % 6) == 0;
      shift = $urandom % 4 != 0;
      d     = W'($urandom);
      @(posedge clk);
      if (load) begin m1 = d; m2 = d; end
      else if (shift) begin m1 = {m1[W-2:0], 1'b0}; m2 = {m2[W-3:0], 2'b00}; end
      #1;
      checks += 4;
      if (q1 !== m1)          begin failures++; $display("q1 %h != %h", q1, m1); end
      if (q2 !== m2)          begin failures++; $display("q2 %h != %h", q2, m2); end
      if (dig1 !== m1[W-1])   failures++;
      if (dig2 !== m2[W-1:W-2]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
