// exception_unit: special operands, overflow and underflow.
//
// Decides the final result from the operands' classes and the normalised
// exponent:
//   * an operand that is NaN, or zero times infinity: quiet NaN 7FC00000,
//     invalid = 1;
//   * an infinite operand: signed infinity (exponent all ones);
//   * a zero operand (exponent field 0; subnormal operands count as zero):
//     signed zero (exponent 0);
//   * normalised exponent >= 255: overflow, signed infinity;
//   * normalised exponent <= 0: underflow, signed zero (no subnormal
//     results are produced);
//   * otherwise the packed sign, exponent and fraction.
// The zero/infinity test comes before the arithmetic result and the
// overflow test after it, as in the multiplication flow. NaN handling and
// flushing of subnormals are this design's own choices. Combinational.
module exception_unit
  import fpmul_pkg::*;
(
  input  float32_t          a,          // operand A
  input  float32_t          b,          // operand B
  input  logic              sign_y,     // product sign
  input  exp_t              exp_n,      // normalised exponent
  input  logic [FRAC_W-1:0] frac_n,     // normalised fraction
  output float32_t          y,          // final result
  output logic              overflow,   // result set to infinity by overflow
  output logic              underflow,  // result set to zero by underflow
  output logic              invalid     // result is NaN
);
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  assign a_zero = (a.exp == '0);
  assign b_zero = (b.exp == '0);
  assign a_inf  = (a.exp == EXP_MAX) && (a.frac == '0);
  assign b_inf  = (b.exp == EXP_MAX) && (b.frac == '0);
  assign a_nan  = (a.exp == EXP_MAX) && (a.frac != '0);
  assign b_nan  = (b.exp == EXP_MAX) && (b.frac != '0);

  // The operand signs are not needed here: sign_y already combines them.
  logic unused_signs;
  assign unused_signs = a.sign ^ b.sign;

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    invalid   = 1'b0;
    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf)) begin
      invalid = 1'b1;
      y       = float32_t'(QNAN);
    end else if (a_inf || b_inf) begin
      y = float32_t'({sign_y, MAG_INF});
    end else if (a_zero || b_zero) begin
      y = float32_t'({sign_y, MAG_ZERO});
    end else if (exp_n >= exp_t'(EXP_MAX)) begin
      overflow = 1'b1;
      y        = float32_t'({sign_y, MAG_INF});
    end else if (exp_n <= exp_t'(0)) begin
      underflow = 1'b1;
      y         = float32_t'({sign_y, MAG_ZERO});
    end else begin
      y = '{sign: sign_y, exp: exp_n[EXP_W-1:0], frac: frac_n};
    end
  end
endmodule
