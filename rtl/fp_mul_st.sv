// fp_mul_st: self-timed IEEE 754 single-precision floating-point multiplier.
//
// The product of A and B is formed in the usual three independent parts:
//   sign      sign_unit       XOR of the operand signs
//   exponent  exp_unit        Ea + Eb in a self-timed carry look-ahead
//                             adder, then minus the bias 127
//   fraction  mant_mul        (1.fa) * (1.fb), 48-bit product
// followed by the normalizer (one-place right shift and exponent increment
// when the product is 2 or more, then truncation to 23 fraction bits) and
// the exception_unit (zero/infinity/NaN operands, overflow to infinity,
// underflow to zero).
//
// There is no clock. The multiplier talks a four-phase request/acknowledge
// handshake: the sender puts A and B on the bus and raises req; the
// multiplier raises ack once the dual-rail exponent adder reports that its
// sum is complete, and y with the flags is then valid; the sender drops
// req, the adder returns to its spacer and ack falls. A and B must be held
// while req is high. The exponent adder's completion signal is the only
// timing reference: the sign, fraction and exception logic are single-rail
// and are taken to settle no later than the exponent path (in silicon they
// would need a matched delay added to ack).
module fp_mul_st
  import fpmul_pkg::*;
(
  input  logic        req,        // request: A and B valid
  input  logic [31:0] a,          // operand A, IEEE 754 single precision
  input  logic [31:0] b,          // operand B
  output logic        ack,        // acknowledge: y valid
  output logic [31:0] y,          // product A*B, truncated
  output logic        overflow,   // y forced to +-infinity by overflow
  output logic        underflow,  // y forced to +-zero by underflow
  output logic        invalid     // y is the quiet NaN
);
  float32_t fa, fb, fy;
  logic                sign_y;
  logic [EXP_W:0]      exp_sum;
  exp_t                exp_raw, exp_n;
  logic [PROD_W-1:0]   prod;
  logic [FRAC_W-1:0]   frac_n;
  logic                shifted;

  assign fa = float32_t'(a);
  assign fb = float32_t'(b);

  sign_unit u_sign (.sign_a(fa.sign), .sign_b(fb.sign), .sign_y(sign_y));

  exp_unit u_exp (
    .req(req), .exp_a(fa.exp), .exp_b(fb.exp),
    .exp_sum(exp_sum), .exp_y(exp_raw), .done(ack)
  );

  mant_mul u_mant (.frac_a(fa.frac), .frac_b(fb.frac), .prod(prod));

  normalizer u_norm (
    .prod(prod), .exp_in(exp_raw), .frac_y(frac_n), .exp_y(exp_n), .shifted(shifted)
  );

  exception_unit u_exc (
    .a(fa), .b(fb), .sign_y(sign_y), .exp_n(exp_n), .frac_n(frac_n),
    .y(fy), .overflow(overflow), .underflow(underflow), .invalid(invalid)
  );

  assign y = fy;

  // Four-phase rule: the acknowledge is never high without a request.
  always_comb begin
    assert final (req || !ack) else $error("fp_mul_st: ack high while req low");
  end

  // Raw exponent sum and the normalisation flag are internal only.
  logic unused_ok;
  assign unused_ok = ^{exp_sum, shifted};
endmodule
