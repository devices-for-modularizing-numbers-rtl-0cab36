// partial_sum_adder: the binary adder (Add1, and Add2 of the two-bit device)
// that forms the partial sum S_i = 2*R_{i-1} + a_i*A.
//
// Doubling R is a one-place wiring shift; the multiplier digit a_i gates A
// (an AND row) before the addition. With R < P and A < P the sum is below 3P,
// so it needs N+2 bits. Purely combinational.
module partial_sum_adder #(
  parameter int unsigned N = 8  // operand width in bits
) (
  input  logic [N-1:0] r,      // previous residue R_{i-1}
  input  logic [N-1:0] a,      // the number A
  input  logic         digit,  // multiplier bit a_i
  output logic [N+1:0] s       // S_i = 2R + a_i*A
);

  logic [N+1:0] r2;
  logic [N+1:0] a_gated;

  assign r2      = {1'b0, r, 1'b0};
  assign a_gated = {2'b00, a & {N{digit}}};
  assign s       = r2 + a_gated;

endmodule
