// fpmul_pkg: types and constants shared by the single-precision multiplier.
//
// An IEEE 754 single-precision value is one sign bit, an 8-bit biased
// exponent (bias 127) and a 23-bit fraction with an implied leading 1.
// float32_t packs the three fields in that order, so a 32-bit word can be
// cast to it directly. The exponent inside the datapath is carried as a
// 10-bit two's-complement number (exp_t) so that Ea + Eb - 127 and the
// normalisation increment can never wrap: its range is -127 .. 384.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;    // exponent field width
  localparam int unsigned FRAC_W = 23;   // fraction field width
  localparam int unsigned SIG_W  = FRAC_W + 1;  // significand with hidden 1
  localparam int unsigned PROD_W = 2 * SIG_W;   // full significand product
  localparam int unsigned XEXP_W = EXP_W + 2;   // internal signed exponent

  localparam logic [EXP_W-1:0] BIAS    = 8'd127;
  localparam logic [EXP_W-1:0] EXP_MAX = 8'hFF;  // INF / NaN exponent

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } float32_t;

  typedef logic signed [XEXP_W-1:0] exp_t;

  // Canonical special values (sign supplied separately).
  localparam logic [30:0] MAG_INF  = 31'h7F80_0000;
  localparam logic [30:0] MAG_ZERO = 31'h0000_0000;
  localparam logic [31:0] QNAN     = 32'h7FC0_0000;

endpackage
