// tb_fp_ref_pkg: reference model of the truncating single-precision
// multiply, for the testbenches.
//
// It works in double precision: the product of two 24-bit significands
// needs 48 bits and a double holds 53, so the real product is exact, and
// truncating its fraction to 23 bits gives the expected result. Operand
// classes and the special results follow the multiplier's rules (subnormal
// operands count as zero, no subnormal results, quiet NaN 7FC00000).
package tb_fp_ref_pkg;

  typedef struct {
    logic [31:0] y;
    logic        overflow;
    logic        underflow;
    logic        invalid;
  } ref_t;

  // Exact double value of a normal single-precision word.
  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    int e;
    e = int'(f[30:23]) - 127 + 1023;
    d = {f[31], 11'(e), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic ref_t ref_mul(logic [31:0] a, logic [31:0] b);
    ref_t r;
    logic s;
    logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
    real p;
    logic [63:0] d;
    int e;
    r = '{y: 32'd0, overflow: 1'b0, underflow: 1'b0, invalid: 1'b0};
    s = a[31] ^ b[31];
    a_zero = a[30:23] == 8'h00;  b_zero = b[30:23] == 8'h00;
    a_inf  = a[30:23] == 8'hFF && a[22:0] == 0;
    b_inf  = b[30:23] == 8'hFF && b[22:0] == 0;
    a_nan  = a[30:23] == 8'hFF && a[22:0] != 0;
    b_nan  = b[30:23] == 8'hFF && b[22:0] != 0;
    if (a_nan || b_nan || (a_inf && b_zero) || (a_zero && b_inf)) begin
      r.y = 32'h7FC0_0000; r.invalid = 1'b1;
    end else if (a_inf || b_inf) begin
      r.y = {s, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      r.y = {s, 31'd0};
    end else begin
      p = f2r(a) * f2r(b);
      d = $realtobits(p);
      e = int'(d[62:52]) - 1023 + 127;
      if (e >= 255) begin
        r.y = {s, 8'hFF, 23'd0}; r.overflow = 1'b1;
      end else if (e <= 0) begin
        r.y = {s, 31'd0}; r.underflow = 1'b1;
      end else begin
        r.y = {s, 8'(e), d[51:29]};
      end
    end
    return r;
  endfunction

endpackage
