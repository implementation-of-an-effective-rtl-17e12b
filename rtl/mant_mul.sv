// mant_mul: significand multiplier.
//
// Each 23-bit fraction gets its hidden leading 1 restored and the two
// 24-bit significands are multiplied into the full 48-bit product. With
// both significands in [1, 2) the product lies in [1, 4), so its top two
// bits are never both 0. Written as a behavioural multiply; the structure
// of the array is left to synthesis. Combinational.
module mant_mul
  import fpmul_pkg::*;
(
  input  logic [FRAC_W-1:0] frac_a,   // fraction of A (hidden 1 implied)
  input  logic [FRAC_W-1:0] frac_b,   // fraction of B
  output logic [PROD_W-1:0] prod      // 1.fa * 1.fb, binary point below bit 46
);
  logic [SIG_W-1:0] sig_a, sig_b;
  assign sig_a = {1'b1, frac_a};
  assign sig_b = {1'b1, frac_b};
  assign prod  = sig_a * sig_b;
endmodule
