// exp_unit: exponent of the product before normalisation.
//
// The two biased 8-bit exponents are added by the self-timed carry
// look-ahead adder (st_cla) and the bias 127 is then subtracted, giving
// Ea + Eb - 127 as a 10-bit two's-complement number (range -127 .. 383).
// The operands enter the dual-rail adder only while req is high: with req
// low both rails of every bit are 0 (spacer), so done is low; with req high
// done rises once the 9-bit sum is complete. The subtraction is made by a
// 10-bit carry look-ahead adder (cla_adder) as sum + ~127 + 1.
// Combinational; done is the completion signal of the exponent addition.
module exp_unit
  import fpmul_pkg::*;
(
  input  logic             req,     // operands valid (four-phase request)
  input  logic [EXP_W-1:0] exp_a,   // biased exponent of A
  input  logic [EXP_W-1:0] exp_b,   // biased exponent of B
  output logic [EXP_W:0]   exp_sum, // Ea + Eb (valid while done)
  output exp_t             exp_y,   // Ea + Eb - 127
  output logic             done     // exponent addition complete
);
  logic [EXP_W-1:0] sum_t, sum_f;
  logic             cout_t, cout_f;
  logic [XEXP_W-1:0] diff;
  logic             diff_cout;

  st_cla #(.WIDTH(EXP_W)) u_add (
    .a_t (exp_a & {EXP_W{req}}), .a_f (~exp_a & {EXP_W{req}}),
    .b_t (exp_b & {EXP_W{req}}), .b_f (~exp_b & {EXP_W{req}}),
    .cin_t (1'b0), .cin_f (req),
    .sum_t (sum_t), .sum_f (sum_f), .cout_t (cout_t), .cout_f (cout_f),
    .done (done)
  );

  assign exp_sum = {cout_t, sum_t};

  cla_adder #(.WIDTH(XEXP_W)) u_sub_bias (
    .a   ({1'b0, exp_sum}),
    .b   (~{2'b00, BIAS}),
    .cin (1'b1),
    .sum (diff),
    .cout(diff_cout)
  );

  assign exp_y = exp_t'(diff);

  // diff_cout is the no-borrow flag of the subtraction, which the signed
  // 10-bit result already carries; the false rails of the sum only feed
  // the adder's own completion detection.
  logic unused_ok;
  assign unused_ok = ^{diff_cout, sum_f, cout_f};
endmodule
