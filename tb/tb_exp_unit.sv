// tb_exp_unit: exponent adder and bias subtractor, all exponent pairs.
// For every pair of 8-bit biased exponents: with req low done must be
// low; with req high done must be high, exp_sum must be Ea + Eb and exp_y
// the signed Ea + Eb - 127.
module tb_exp_unit;
  import fpmul_pkg::*;
  logic clk = 1'b0;
  logic       req, done;
  logic [7:0] ea, eb;
  logic [8:0] esum;
  exp_t       ey;
  int checks = 0, failures = 0;

  exp_unit dut (.req(req), .exp_a(ea), .exp_b(eb), .exp_sum(esum), .exp_y(ey), .done(done));

  always #5 clk = ~clk;

  initial begin
    fork
      begin
        repeat (200000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    req = 1'b0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        ea = 8'(a); eb = 8'(b); req = 1'b0;
        #1;
        checks++;
        if (done) begin failures++; $display("FAIL done without req %0d %0d", a, b); end
        req = 1'b1;
        #1;
        checks += 3;
        if (!done) begin failures++; $display("FAIL no done %0d %0d", a, b); end
        if (int'(esum) != a + b) begin failures++; $display("FAIL sum %0d+%0d=%0d", a, b, esum); end
        if (int'(ey) != a + b - 127) begin failures++; $display("FAIL exp %0d+%0d-127=%0d", a, b, ey); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
