// tb_bsin: checks the synchronization block. For several shift codes it
// checks that load follows start in the same cycle, that exactly code+1
// step cycles follow back to back, that done pulses once in the cycle after
// the last step, and that a start while busy is ignored.
module tb_bsin;
  localparam int CW = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] shift_code = '0;
  logic load, step, busy, done;
  int checks = 0, failures = 0;

  bsin #(.CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int code, input bit poke_busy);
    int steps, dones;
    @(negedge clk);
    shift_code = CW'(code);
    start = 1;
    #1;
    checks++; if (!load) begin failures++; $display("no load code=%0d", code); end
    @(negedge clk);
    start = 0;
    steps = 0; dones = 0;
    // count steps until done
    for (int c = 0; c < 40 && dones == 0; c++) begin
      if (poke_busy && c == 1) begin
        start = 1; #1;
        checks++; if (load) failures++;
      end
      if (step) steps++;
      @(negedge clk);
      start = 0;
      if (done) begin
        dones++;
        checks++; if (step || busy) failures++;
      end
    end
    checks++;
    if (steps != code + 1) begin
      failures++; $display("code=%0d steps=%0d", code, steps);
    end
    checks++; if (dones != 1) failures++;
    @(negedge clk);
    checks++; if (done || busy) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++; if (busy || done || step) failures++;
    rst_n = 1;
    for (int k = 0; k < 16; k++) run(k, k % 3 == 1);
    for (int k = 0; k < 20; k++) run($urandom % 16, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
