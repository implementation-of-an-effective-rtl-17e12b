// tb_mant_mul: significand product with the hidden 1 restored.
// Corners (both fractions zero, both all ones) and random fractions; the
// expected product is formed in 64-bit integer arithmetic.
module tb_mant_mul;
  logic clk = 1'b0;
  logic [22:0] fa, fb;
  logic [47:0] prod;
  int checks = 0, failures = 0;

  mant_mul dut (.frac_a(fa), .frac_b(fb), .prod(prod));

  always #5 clk = ~clk;

  initial begin
    longint unsigned e;
    fork
      begin
        repeat (100000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      case (i)
        0: begin fa = '0; fb = '0; end
        1: begin fa = '1; fb = '1; end
        2: begin fa = '0; fb = '1; end
        default: begin fa = 23'($urandom); fb = 23'($urandom); end
      endcase
      #1;
      e = (longint'(fa) + 64'h80_0000) * (longint'(fb) + 64'h80_0000);
      checks++;
      if (64'(prod) != e) begin failures++; $display("FAIL %h*%h=%h", fa, fb, prod); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
