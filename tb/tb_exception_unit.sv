// tb_exception_unit: special operands, overflow and underflow.
// Operand classes (zero, subnormal, normal, infinity, NaN) are combined in
// every pairing with random signs and normalised exponents around the
// limits (-5 .. 5 and 250 .. 260 plus random in-range values); the
// expected word and flags are derived from the class table in this file.
module tb_exception_unit;
  import fpmul_pkg::*;
  logic clk = 1'b0;
  float32_t    a, b, y;
  logic        sy, ovf, udf, inv;
  exp_t        en;
  logic [22:0] fn;
  int checks = 0, failures = 0;

  exception_unit dut (.a(a), .b(b), .sign_y(sy), .exp_n(en), .frac_n(fn),
                      .y(y), .overflow(ovf), .underflow(udf), .invalid(inv));

  always #5 clk = ~clk;

  // class 0 zero, 1 subnormal, 2 normal, 3 infinity, 4 NaN
  function automatic logic [31:0] make(int cls);
    logic [31:0] v;
    v = $urandom;
    case (cls)
      0: v[30:0] = '0;
      1: begin v[30:23] = 8'h00; v[22] = 1'b1; end
      2: v[30:23] = 8'(1 + ($urandom % 254));
      3: v[30:0] = 31'h7F80_0000;
      default: begin v[30:23] = 8'hFF; v[0] = 1'b1; end
    endcase
    return v;
  endfunction

  initial begin
    logic [31:0] ey;
    logic [2:0]  ef;
    int e;
    fork
      begin
        repeat (100000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int ca = 0; ca < 5; ca++)
      for (int cb = 0; cb < 5; cb++)
        for (int k = 0; k < 40; k++) begin
          @(negedge clk);
          a = float32_t'(make(ca)); b = float32_t'(make(cb));
          sy = 1'($urandom);
          fn = 23'($urandom);
          if (k < 11)      e = k - 5;
          else if (k < 22) e = 250 + (k - 11);
          else             e = 1 + int'($urandom % 254);
          en = exp_t'(e);
          #1;
          ef = 3'b000;   // {overflow, underflow, invalid}
          if (ca == 4 || cb == 4 || (ca == 3 && cb < 2) || (cb == 3 && ca < 2)) begin
            ey = 32'h7FC0_0000; ef = 3'b001;
          end else if (ca == 3 || cb == 3) ey = {sy, 31'h7F80_0000};
          else if (ca < 2 || cb < 2)       ey = {sy, 31'd0};
          else if (e >= 255) begin ey = {sy, 31'h7F80_0000}; ef = 3'b100; end
          else if (e <= 0)   begin ey = {sy, 31'd0};         ef = 3'b010; end
          else ey = {sy, 8'(e), fn};
          checks += 2;
          if (32'(y) !== ey) begin failures++; $display("FAIL y cls %0d,%0d e=%0d: %h vs %h", ca, cb, e, y, ey); end
          if ({ovf, udf, inv} !== ef) begin failures++; $display("FAIL flags cls %0d,%0d e=%0d", ca, cb, e); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
