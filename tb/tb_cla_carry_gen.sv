// tb_cla_carry_gen: the look-ahead carries against a ripple recurrence.
// The default 4-bit block is tested exhaustively over every generate,
// propagate and carry-in pattern (512 cases), and a 10-bit block with
// random patterns; the expected carries come from c[i+1] = g | p & c[i]
// evaluated bit after bit.
module tb_cla_carry_gen;
  logic clk = 1'b0;
  logic [3:0] g4, p4;  logic c0_4;  logic [4:0]  c4;
  logic [9:0] g10, p10; logic c0_10; logic [10:0] c10;
  int checks = 0, failures = 0;

  cla_carry_gen            dut4  (.g(g4),  .p(p4),  .c0(c0_4),  .c(c4));
  cla_carry_gen #(.WIDTH(10)) dut10 (.g(g10), .p(p10), .c0(c0_10), .c(c10));

  always #5 clk = ~clk;

  function automatic logic [10:0] ripple(logic [9:0] g, logic [9:0] p, logic c0, int w);
    logic [10:0] c;
    c = '0;
    c[0] = c0;
    for (int i = 0; i < w; i++) c[i+1] = g[i] | (p[i] & c[i]);
    return c;
  endfunction

  initial begin
    logic [10:0] e;
    fork
      begin
        repeat (10000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      {c0_4, g4, p4} = 9'(i);
      {g10, p10, c0_10} = {$urandom, $urandom};
      #1;
      e = ripple({6'd0, g4}, {6'd0, p4}, c0_4, 4);
      checks++;
      if (c4 !== e[4:0]) begin failures++; $display("FAIL w4 g=%b p=%b c0=%b c=%b", g4, p4, c0_4, c4); end
      e = ripple(g10, p10, c0_10, 10);
      checks++;
      if (c10 !== e) begin failures++; $display("FAIL w10 g=%b p=%b c0=%b c=%b", g10, p10, c0_10, c10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
