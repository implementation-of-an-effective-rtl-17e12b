// tb_clc: exhaustive test of the carry look-ahead cell.
// For all eight (a, b, c) the cell must report generate when both bits
// are 1, propagate when exactly one is, and the sum bit of a + b + c.
module tb_clc;
  logic clk = 1'b0;
  logic a, b, c, g, p, s;
  int checks = 0, failures = 0;

  clc dut (.a(a), .b(b), .c(c), .g(g), .p(p), .s(s));

  always #5 clk = ~clk;

  initial begin
    int total;
    fork
      begin
        repeat (1000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      {a, b, c} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks += 3;
      if (g !== (a && b))        begin failures++; $display("FAIL g a=%b b=%b", a, b); end
      if (p !== (a != b))        begin failures++; $display("FAIL p a=%b b=%b", a, b); end
      if (s !== total[0])        begin failures++; $display("FAIL s a=%b b=%b c=%b", a, b, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
