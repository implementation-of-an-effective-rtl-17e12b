// tb_cla_adder: the carry look-ahead adder against integer addition.
// The default 4-bit adder is tested exhaustively (512 cases with the
// carry-in), and the 10-bit adder used for the bias subtraction with
// random operands plus the all-ones/all-zeros corners.
module tb_cla_adder;
  logic clk = 1'b0;
  logic [3:0] a4, b4, s4;   logic ci4, co4;
  logic [9:0] a10, b10, s10; logic ci10, co10;
  int checks = 0, failures = 0;

  cla_adder               dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  cla_adder #(.WIDTH(10)) dut10 (.a(a10), .b(b10), .cin(ci10), .sum(s10), .cout(co10));

  always #5 clk = ~clk;

  initial begin
    logic [4:0]  e4;
    logic [10:0] e10;
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
      {ci4, a4, b4} = 9'(i);
      if (i < 4) {a10, b10, ci10} = {{10{i[0]}}, {10{i[1]}}, i[0]};
      else       {a10, b10, ci10} = 21'($urandom);
      #1;
      e4  = 5'(a4) + 5'(b4) + 5'(ci4);
      e10 = 11'(a10) + 11'(b10) + 11'(ci10);
      checks += 2;
      if ({co4, s4} !== e4)    begin failures++; $display("FAIL w4 %0d+%0d+%0d=%0d", a4, b4, ci4, {co4, s4}); end
      if ({co10, s10} !== e10) begin failures++; $display("FAIL w10 %0d+%0d+%0d=%0d", a10, b10, ci10, {co10, s10}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
