// Coefficient ROM of the FIR filter.
//
// Holds one COEF_W-bit coefficient per tap and returns the one at addr
// without a clock (a lookup table), so coefficient and sample of a tap reach
// the multiplier in the same cycle. The default contents are the published
// coefficient table 6, 8, 10, 13, 18, 23, 34, 47 at addresses 0 to 7; each is
// round(255 * peak ripple) of an equiripple low-pass design with pass-band
// edge 0.1 and a stop-band edge stepped from 0.15 down to 0.115. Other
// contents can be given through the COEFS parameter.
module coeff_rom #(
  parameter fir_pkg::coef_table_t COEFS = fir_pkg::COEFS
) (
  input  fir_pkg::addr_t addr,
  output fir_pkg::coef_t coef
);
  assign coef = COEFS[addr];
endmodule
