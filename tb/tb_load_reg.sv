// tb_load_reg: self-checking test of the parallel-load register. Drives
// random clear/enable/data sequences and compares q every clock with a
// reference model kept in the testbench (clear wins over enable).
module tb_load_reg;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  load_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      clr = ($urandom % 8) == 0;
      en  = $urandom % 2;
      d   = W'($urandom);
      @(posedge clk);
      if (clr) model = '0; else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch i=%0d q=%h model=%h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
