// modsq_2bit: modular squaring device R = A^2 mod P that analyses two bits
// of the multiplier per clock, halving the number of RgA2 shifts.
//
// Each clock runs two reduction steps in cascade, both combinational:
//     S  = 2*R + a_i*A      (Add1)    r = S  mod P   (PRF1)
//     S' = 2*r + a_{i-1}*A  (Add2)    R = S' mod P   (PRF2)
// and only the second result is written into RgR. Both shapers are the
// second (comparator-based) variant. RgA2 shifts by two places per clock and
// its top two bits are (a_i, a_{i-1}).
//
// Interface and handshake are those of modsq_1bit: pulse `start` with
// `a_in`, `p_in` while idle; ceil(N/2) steps follow; `done` pulses one clock
// after the last step with A^2 mod P in `r_out`. Latency from start to done:
// ceil(N/2) + 1 clocks. Requirement: 0 <= A < P.
//
// For odd N, RgA2 is one bit wider and A enters it with a leading zero, so
// the first digit pair starts with a 0 that leaves R at 0; this padding is a
// choice of this design, as are the clocked handshake, the reset and the
// default N = 8. The two-adder, two-shaper structure follows the device
// description.
module modsq_2bit #(
  parameter int unsigned N = 8  // operand width in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a_in,   // number A, must be below P
  input  logic [N-1:0] p_in,   // modulus P
  output logic         busy,
  output logic         done,   // End of operation
  output logic [N-1:0] r_out   // RgR: residue, result when done
);

  localparam int unsigned NP    = N + (N % 2);  // RgA2 width, even
  localparam int unsigned STEPS = NP / 2;
  localparam int unsigned CW    = (STEPS > 2) ? $clog2(STEPS) : 1;
  localparam logic [CW-1:0] SHIFT_CODE = CW'(STEPS - 1);

  logic          load, step;
  logic [N-1:0]  rga1, rgp, r_mid, r_next;
  logic [NP-1:0] rga2, rga2_d;
  logic [1:0]    digits;
  logic [N+1:0]  s1, s2;
  logic [1:0]    sub_mult1, sub_mult2;

  assign rga2_d = NP'(a_in);

  bsin #(.CW(CW)) u_bsin (
    .clk, .rst_n, .start,
    .shift_code(SHIFT_CODE),
    .load, .step, .busy, .done
  );

  load_reg #(.W(N)) u_rga1 (
    .clk, .rst_n, .clr(1'b0), .en(load), .d(a_in), .q(rga1)
  );

  load_reg #(.W(N)) u_rgp (
    .clk, .rst_n, .clr(1'b0), .en(load), .d(p_in), .q(rgp)
  );

  shift_reg_left #(.W(NP), .SHIFT(2)) u_rga2 (
    .clk, .rst_n, .load, .shift(step), .d(rga2_d), .q(rga2), .digits
  );

  partial_sum_adder #(.N(N)) u_add1 (
    .r(r_out), .a(rga1), .digit(digits[1]), .s(s1)
  );

  prf_v2 #(.N(N)) u_prf1 (.s(s1), .p(rgp), .r(r_mid), .sub_mult(sub_mult1));

  partial_sum_adder #(.N(N)) u_add2 (
    .r(r_mid), .a(rga1), .digit(digits[0]), .s(s2)
  );

  prf_v2 #(.N(N)) u_prf2 (.s(s2), .p(rgp), .r(r_next), .sub_mult(sub_mult2));

  load_reg #(.W(N)) u_rgr (
    .clk, .rst_n, .clr(load), .en(step), .d(r_next), .q(r_out)
  );

  a_below_p: assert property (@(posedge clk) disable iff (!rst_n)
                              load |-> (a_in < p_in));

endmodule
