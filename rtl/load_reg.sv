// load_reg: parallel-load register used for RgA1 (the number A), RgP (the
// modulus P) and RgR (the running residue and, at the end, the result).
//
// On a rising clock edge the register clears when `clr` is high, otherwise
// takes `d` when `en` is high, otherwise holds. `clr` has priority so RgR can
// be zeroed in the same cycle the operands are loaded. Reset is asynchronous
// and active low and clears the register. The register roles follow the
// device description; the clear/enable interface and reset are choices of
// this design.
module load_reg #(
  parameter int unsigned W = 8  // register width in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,  // synchronous clear (wins over en)
  input  logic         en,   // load d
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end

endmodule
