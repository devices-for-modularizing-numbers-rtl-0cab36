// shift_reg_left: the multiplier register RgA2. It is loaded with the number
// A and shifted toward its most significant end, so that its top SHIFT bits
// are always the multiplier digit(s) being analysed in the current clock:
// a_{N-1} first, a_0 last (multiplication from the senior digits).
//
// Interface: `load` (priority) copies `d`; `shift` moves the contents left
// by SHIFT places and fills zeros from the right. `digits` is the top SHIFT
// bits, valid combinationally from the register. SHIFT = 1 serves the
// one-bit-per-clock device, SHIFT = 2 the two-bit one. One clock per shift;
// asynchronous active-low reset clears the register (a design choice).
module shift_reg_left #(
  parameter int unsigned W     = 8,  // register width in bits
  parameter int unsigned SHIFT = 1   // places shifted per clock
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [W-1:0]     d,
  output logic [W-1:0]     q,
  output logic [SHIFT-1:0] digits  // q[W-1 -: SHIFT]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= q << SHIFT;
  end

  assign digits = q[W-1 -: SHIFT];

endmodule
