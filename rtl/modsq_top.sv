// modsq_top: the two modular squaring devices side by side, each with its
// own operand inputs, handshake and result.
//
//   dev1: one multiplier bit per clock, first-variant residue shaper
//         (two adders); A^2 mod P after N steps.
//   dev2: two multiplier bits per clock, two second-variant shapers
//         (one adder, two comparators each); A^2 mod P after ceil(N/2) steps.
//
// Each device: pulse startX for one clock with aX, pX (A < P) while busyX is
// low; doneX pulses once when rX holds the result. See modsq_1bit and
// modsq_2bit for timing. Putting both devices in one top is a choice of this
// design; they share only the clock and reset.
module modsq_top #(
  parameter int unsigned N = 8  // operand width in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  // one-bit-per-clock device
  input  logic         start1,
  input  logic [N-1:0] a1,
  input  logic [N-1:0] p1,
  output logic         busy1,
  output logic         done1,
  output logic [N-1:0] r1,
  // two-bits-per-clock device
  input  logic         start2,
  input  logic [N-1:0] a2,
  input  logic [N-1:0] p2,
  output logic         busy2,
  output logic         done2,
  output logic [N-1:0] r2
);

  modsq_1bit #(.N(N), .PRF_VARIANT(1)) u_dev1 (
    .clk, .rst_n, .start(start1), .a_in(a1), .p_in(p1),
    .busy(busy1), .done(done1), .r_out(r1)
  );

  modsq_2bit #(.N(N)) u_dev2 (
    .clk, .rst_n, .start(start2), .a_in(a2), .p_in(p2),
    .busy(busy2), .done(done2), .r_out(r2)
  );

endmodule
