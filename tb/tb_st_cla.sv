// tb_st_cla: the dual-rail self-timed adder, exhaustively at 8 bits.
// For every pair of 8-bit operands and both carry-ins it runs one
// four-phase cycle: from the spacer (all rails low, done must be low) the
// operands arrive one after the other -- with only A valid done must stay
// low -- then with both valid done must be high, every sum bit and the
// carry-out must hold exactly one high rail, and the true rails must equal
// a + b + cin. The inputs then return to the spacer and every output rail
// must fall and done with them.
module tb_st_cla;
  logic clk = 1'b0;
  logic [7:0] a_t, a_f, b_t, b_f, s_t, s_f;
  logic       ci_t, ci_f, co_t, co_f, done;
  int checks = 0, failures = 0;

  st_cla dut (.a_t(a_t), .a_f(a_f), .b_t(b_t), .b_f(b_f), .cin_t(ci_t), .cin_f(ci_f),
              .sum_t(s_t), .sum_f(s_f), .cout_t(co_t), .cout_f(co_f), .done(done));

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what, int a, int b, int ci);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%0d b=%0d cin=%0d", what, a, b, ci);
    end
  endtask

  initial begin
    logic [8:0] e;
    fork
      begin
        repeat (200000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    {a_t, a_f, b_t, b_f, ci_t, ci_f} = '0;
    for (int ci = 0; ci < 2; ci++)
      for (int a = 0; a < 256; a++)
        for (int b = 0; b < 256; b++) begin
          // spacer
          {a_t, a_f, b_t, b_f, ci_t, ci_f} = '0;
          #1;
          chk(!done && s_t == 0 && s_f == 0 && !co_t && !co_f, "spacer", a, b, ci);
          // A and carry-in valid, B still empty
          a_t = 8'(a); a_f = ~8'(a); ci_t = ci[0]; ci_f = !ci[0];
          #1;
          chk(!done, "early done", a, b, ci);
          // B valid
          b_t = 8'(b); b_f = ~8'(b);
          #1;
          e = 9'(a) + 9'(b) + 9'(ci);
          chk(done, "no done", a, b, ci);
          chk((s_t ^ s_f) == 8'hFF && (co_t ^ co_f), "bad code", a, b, ci);
          chk({co_t, s_t} == e, "sum", a, b, ci);
        end
    {a_t, a_f, b_t, b_f, ci_t, ci_f} = '0;
    #1;
    chk(!done, "final spacer", 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
