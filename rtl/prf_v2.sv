// prf_v2: partial residue shaper, second variant. Reduces a partial sum
// S < 3P to R = S mod P using one adder and two comparators, cheaper than
// the two-adder first variant.
//
// COMP-1 compares S with 2P and COMP-2 compares S with P. If S >= 2P,
// COMP-1 steers ~(2P) onto the right inputs of adder Add2, which with +1 on
// its carry input yields S - 2P. If 2P > S >= P, gate AND9 steers ~P and
// Add2 yields S - P. If S < P, COMP-2 opens gate row AND8 which passes S
// itself, and OR3 merges this path with the adder output. This structure
// follows the device description.
//
// `sub_mult` (0, 1 or 2: multiple of P removed) is an observation output
// added by this design. Correct for S < 3P. Combinational.
module prf_v2 #(
  parameter int unsigned N = 8  // modulus width in bits
) (
  input  logic [N+1:0] s,        // partial sum, S < 3P
  input  logic [N-1:0] p,        // modulus P
  output logic [N-1:0] r,        // S mod P
  output logic [1:0]   sub_mult  // multiple of P subtracted
);

  localparam int unsigned W = N + 2;

  logic [W-1:0] p1, p2;
  logic         comp1_ge;  // COMP-1: S >= 2P
  logic         comp2_lt;  // COMP-2: S < P
  logic         and9;      // 2P > S >= P
  logic [W-1:0] add2_rhs, add2_sum, and8, or3;

  assign p1 = {2'b00, p};
  assign p2 = {1'b0, p, 1'b0};

  assign comp1_ge = (s >= p2);
  assign comp2_lt = (s <  p1);
  assign and9     = ~comp1_ge & ~comp2_lt;

  assign add2_rhs = (~p2 & {W{comp1_ge}}) | (~p1 & {W{and9}});
  assign add2_sum = s + add2_rhs + {{(W-1){1'b0}}, 1'b1};

  assign and8 = s & {W{comp2_lt}};
  assign or3  = and8 | (add2_sum & {W{~comp2_lt}});

  assign r        = or3[N-1:0];
  assign sub_mult = {comp1_ge, and9};

endmodule
