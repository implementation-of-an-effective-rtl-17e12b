// tb_normalizer: normalising shift and truncation.
// Random products in [1, 4) (top bits 01, 10 or 11) with random exponents;
// the expected fraction is the 23 bits right below the leading 1, and the
// exponent is incremented exactly when the leading 1 is in bit 47.
module tb_normalizer;
  import fpmul_pkg::*;
  logic clk = 1'b0;
  logic [47:0] prod;
  exp_t        ein, ey;
  logic [22:0] fy;
  logic        sh;
  int checks = 0, failures = 0, n_sh = 0;

  normalizer dut (.prod(prod), .exp_in(ein), .frac_y(fy), .exp_y(ey), .shifted(sh));

  always #5 clk = ~clk;

  initial begin
    int lead, eexp;
    logic [22:0] ef;
    fork
      begin
        repeat (100000) @(posedge clk);
        failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      prod = {$urandom, $urandom};
      if (prod[47:46] == 2'b00) prod[46] = 1'b1;
      ein  = exp_t'(int'($urandom % 500) - 127);
      #1;
      lead = prod[47] ? 47 : 46;
      ef   = 23'(prod >> (lead - 23));
      eexp = int'(ein) + (lead - 46);
      checks += 3;
      if (fy !== ef)          begin failures++; $display("FAIL frac %h -> %h", prod, fy); end
      if (int'(ey) != eexp)   begin failures++; $display("FAIL exp %0d -> %0d", ein, ey); end
      if (sh !== (lead == 47)) begin failures++; $display("FAIL shifted %h", prod); end
      if (sh) n_sh++;
    end
    checks++;
    if (n_sh == 0 || n_sh == 4000) begin failures++; $display("FAIL shift cases not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
