// normalizer: brings the significand product back to the form 1.f.
//
// The 48-bit product of two significands is either 01.x (binary point
// below bit 46) or 1x.x. In the second case it is shifted right by one
// place and the exponent is incremented. The 23 fraction bits below the
// leading 1 are kept and the rest are dropped: the result is truncated
// (rounded toward zero), not rounded to nearest.
// Combinational.
module normalizer
  import fpmul_pkg::*;
(
  input  logic [PROD_W-1:0] prod,     // significand product
  input  exp_t              exp_in,   // Ea + Eb - 127
  output logic [FRAC_W-1:0] frac_y,   // normalised, truncated fraction
  output exp_t              exp_y,    // exponent after normalisation
  output logic              shifted   // product was 1x.x and was shifted
);
  assign shifted = prod[PROD_W-1];
  assign frac_y  = shifted ? prod[PROD_W-2 -: FRAC_W] : prod[PROD_W-3 -: FRAC_W];
  assign exp_y   = exp_in + exp_t'(shifted);
endmodule
