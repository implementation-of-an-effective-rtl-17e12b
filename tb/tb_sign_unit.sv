// tb_sign_unit: exhaustive test of the product-sign XOR.
// All four sign combinations are applied; the expected sign is negative
// exactly when the two operand signs differ.
module tb_sign_unit;
  logic clk = 1'b0;
  logic sa, sb, sy;
  int checks = 0, failures = 0;

  sign_unit dut (.sign_a(sa), .sign_b(sb), .sign_y(sy));

  always #5 clk = ~clk;

  initial begin
    fork
      begin
        repeat (1000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      {sa, sb} = 2'(i);
      #1;
      checks++;
      if (sy !== (sa != sb)) begin
        failures++;
        $display("FAIL sa=%b sb=%b sy=%b", sa, sb, sy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
