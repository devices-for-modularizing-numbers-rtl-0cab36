// prf_v1: partial residue shaper, first variant. Reduces a partial sum
// S < 3P to R = S mod P in one combinational pass.
//
// Two adders work in parallel on two's-complement subtraction: Add3 forms
// S + ~(2P) + 1 = S - 2P and Add2 forms S + ~P + 1 = S - P, each with +1 on
// its carry input. A carry out of Add3 (C3 = 1, Sign3 = 0) means S >= 2P and
// gate row AND8 passes S - 2P. If Sign3 = 1 and Add2 carries (C2 = 1),
// P <= S < 2P and AND9 passes S - P. If Add2 does not carry (Sign2 = 1),
// S < P and AND10 passes S unchanged. OR1 merges the three rows; exactly one
// is open. This structure follows the device description.
//
// `sub_mult` reports which multiple of P was removed (0, 1 or 2); it is an
// observation output added by this design. The result is only correct for
// S < 3P, which holds when A < P.
module prf_v1 #(
  parameter int unsigned N = 8  // modulus width in bits
) (
  input  logic [N+1:0] s,        // partial sum, S < 3P
  input  logic [N-1:0] p,        // modulus P
  output logic [N-1:0] r,        // S mod P
  output logic [1:0]   sub_mult  // multiple of P subtracted
);

  localparam int unsigned W = N + 2;

  logic [W-1:0] p1, p2;      // P and 2P at full sum width
  logic [W:0]   add3, add2;  // sums with carry out
  logic         c3, c2, sign3, sign2;
  logic [W-1:0] and8, and9, and10, or1;

  assign p1 = {2'b00, p};
  assign p2 = {1'b0, p, 1'b0};

  // Add3: S + ~(2P) + 1, Add2: S + ~P + 1
  assign add3  = {1'b0, s} + {1'b0, ~p2} + {{W{1'b0}}, 1'b1};
  assign add2  = {1'b0, s} + {1'b0, ~p1} + {{W{1'b0}}, 1'b1};
  assign c3    = add3[W];
  assign c2    = add2[W];
  assign sign3 = ~c3;
  assign sign2 = ~c2;

  assign and8  = add3[W-1:0] & {W{c3}};
  assign and9  = add2[W-1:0] & {W{sign3 & c2}};
  assign and10 = s           & {W{sign2}};
  assign or1   = and8 | and9 | and10;

  assign r        = or1[N-1:0];
  assign sub_mult = {c3, sign3 & c2};

endmodule
