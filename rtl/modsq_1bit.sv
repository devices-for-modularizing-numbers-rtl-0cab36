// modsq_1bit: modular squaring device R = A^2 mod P that analyses one bit
// of the multiplier per clock, starting from the most significant bit.
//
// The square is built Horner-fashion with the reduction folded into every
// step: R starts at 0 and for i = N-1 down to 0
//     S_i = 2*R + a_i*A        (adder Add1)
//     R   = S_i mod P          (partial residue shaper PRF)
// Because R < P and A < P, S_i < 3P and the PRF needs at most two trial
// subtractions. RgA1 holds A, RgA2 holds a copy of A that is shifted left so
// its top bit is a_i, RgP holds P and RgR the running residue. The
// synchronization block BSIN counts the N-1 shifts and signals the end.
//
// Interface: pulse `start` for one clock with `a_in` and `p_in` valid while
// `busy` is low. The operands are loaded in that cycle, then N steps follow
// (`busy` high), one per clock. `done` is high for one clock after the last
// step; `r_out` (RgR) then holds A^2 mod P until the next start. During the
// run `r_out` shows the partial residues R_0 .. R_{N-1}. Latency from start
// to done: N + 1 clocks. Requirement: 0 <= A < P.
//
// PRF_VARIANT selects the first (two adders) or second (one adder, two
// comparators) shaper. The dataflow follows the device description; the
// clocked handshake, the reset and the default width N = 8 (large enough for
// the worked examples with P up to 65) are choices of this design.
module modsq_1bit #(
  parameter int unsigned N           = 8,  // operand width in bits
  parameter int unsigned PRF_VARIANT = 1   // 1: Add2/Add3 shaper, 2: COMP shaper
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

  localparam int unsigned CW = (N > 2) ? $clog2(N) : 1;
  localparam logic [CW-1:0] SHIFT_CODE = CW'(N - 1);

  logic         load, step;
  logic [N-1:0] rga1, rgp, rga2;
  logic         a_digit;
  logic [N+1:0] s;
  logic [N-1:0] r_next;
  logic [1:0]   sub_mult;

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

  shift_reg_left #(.W(N), .SHIFT(1)) u_rga2 (
    .clk, .rst_n, .load, .shift(step), .d(a_in), .q(rga2), .digits(a_digit)
  );

  partial_sum_adder #(.N(N)) u_add1 (
    .r(r_out), .a(rga1), .digit(a_digit), .s
  );

  if (PRF_VARIANT == 2) begin : g_prf
    prf_v2 #(.N(N)) u_prf (.s, .p(rgp), .r(r_next), .sub_mult);
  end else begin : g_prf
    prf_v1 #(.N(N)) u_prf (.s, .p(rgp), .r(r_next), .sub_mult);
  end

  load_reg #(.W(N)) u_rgr (
    .clk, .rst_n, .clr(load), .en(step), .d(r_next), .q(r_out)
  );

  // Operands must satisfy A < P, otherwise S can reach 3P and the shaper
  // (two trial subtractions) cannot reduce it.
  a_below_p: assert property (@(posedge clk) disable iff (!rst_n)
                              load |-> (a_in < p_in));

endmodule
