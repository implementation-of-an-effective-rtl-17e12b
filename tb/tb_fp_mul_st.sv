// tb_fp_mul_st: end-to-end test of the self-timed multiplier at its
// default (and only) size.
//
// A sender process runs the four-phase handshake: it places A and B,
// raises req, waits for ack, compares y and the flags with a double-
// precision reference (tb_fp_ref_pkg), drops req and waits for ack to
// fall. Vectors: the worked example and the multiplier output table
// (5.25*286.75, 6.25*585.25, 23*12, 44*5, 9*5; expected words computed
// offline from the exact decimal products), the waveform example
// 445.65*745.78 = 48A2489B (truncated), then signed zeros, infinities,
// NaNs, overflow, underflow and random normal operands. Every mechanism
// (normalising shift or not, zero/infinity/NaN operand, overflow,
// underflow, negative result) is counted and must occur at least once.
// A free-running clock only paces the test and drives the watchdog.
module tb_fp_mul_st;
  import tb_fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        req;
  logic [31:0] a, b, y;
  logic        ack, overflow, underflow, invalid;

  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_zero = 0, n_inf = 0, n_nan = 0;
  int n_ovf = 0, n_udf = 0, n_neg = 0, n_hs = 0;
  logic [31:0] last_y;   // y captured while ack was high

  fp_mul_st dut (.req(req), .a(a), .b(b), .ack(ack), .y(y),
                 .overflow(overflow), .underflow(underflow), .invalid(invalid));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h (a=%08h b=%08h)", what, got, exp, a, b);
    end
  endtask

  // One complete four-phase transfer with checks.
  task automatic mul(logic [31:0] ta, logic [31:0] tb_);
    ref_t r;
    int waited;
    @(negedge clk);
    a = ta; b = tb_;
    #1;
    check("ack low before req", {31'd0, ack}, 32'd0);
    req = 1'b1;
    waited = 0;
    while (!ack && waited < 10) begin #1; waited++; end
    check("ack after req", {31'd0, ack}, 32'd1);
    r = ref_mul(ta, tb_);
    last_y = y;
    check("product", y, r.y);
    check("flags", {29'd0, overflow, underflow, invalid},
          {29'd0, r.overflow, r.underflow, r.invalid});
    // mechanism counters
    if (r.invalid) n_nan++;
    else if (ta[30:23] == 8'hFF || tb_[30:23] == 8'hFF) n_inf++;
    else if (ta[30:23] == 8'h00 || tb_[30:23] == 8'h00) n_zero++;
    else if (dut.shifted) n_shift++;
    else n_noshift++;
    if (overflow) n_ovf++;
    if (underflow) n_udf++;
    if (y[31] && !invalid) n_neg++;
    @(negedge clk);
    req = 1'b0;
    #1;
    check("ack returns to zero", {31'd0, ack}, 32'd0);
    n_hs++;
  endtask

  function automatic logic [31:0] rnd_normal();
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(64 + ($urandom % 128));  // keep most products in range
    return v;
  endfunction

  initial begin
    req = 1'b0; a = '0; b = '0;
    // watchdog
    fork
      begin
        repeat (200000) @(posedge clk);
        failures++;
        $display("FAIL watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    join_none

    // worked example and the published output table
    mul(32'h40C80000, 32'h44125000); check("6.25*585.25", last_y, 32'h45649D00);
    mul(32'h40A80000, 32'h438F6000); check("5.25*286.75", last_y, 32'h44BC2E00);
    mul(32'h41B80000, 32'h41400000); check("23*12", last_y, 32'h438A0000);
    mul(32'h42300000, 32'h40A00000); check("44*5", last_y, 32'h435C0000);
    mul(32'h41100000, 32'h40A00000); check("9*5", last_y, 32'h42340000);
    // waveform example: 445.65 * 745.78
    mul(32'h43DED333, 32'h443A71EC); check("445.65*745.78", last_y, 32'h48A2489B);
    // signs
    mul(32'hC0C80000, 32'h44125000); check("-6.25*585.25", last_y, 32'hC5649D00);
    mul(32'hC0C80000, 32'hC4125000); check("-6.25*-585.25", last_y, 32'h45649D00);
    // special operands
    mul(32'h00000000, 32'h3F800000);
    mul(32'h80000000, 32'h40000000);
    mul(32'h00400000, 32'h3F800000);   // subnormal counts as zero
    mul(32'h7F800000, 32'h40000000);
    mul(32'hFF800000, 32'hFF800000);
    mul(32'h7F800000, 32'h00000000);   // inf * 0
    mul(32'h7FC00001, 32'h3F800000);   // NaN
    // overflow and underflow
    mul(32'h7F000000, 32'h7F000000);
    mul(32'hFF7FFFFF, 32'h40000000);
    mul(32'h00800000, 32'h00800000);
    mul(32'h80800000, 32'h3E800000);
    mul(32'h3F800000, 32'h00800000);   // smallest normal stays normal
    mul(32'h7F7FFFFF, 32'h3F800000);   // largest normal stays normal
    // random operands
    repeat (3000) mul(rnd_normal(), rnd_normal());
    repeat (500)  mul($urandom, $urandom);

    // each mechanism must have occurred
    checks++; if (n_shift   == 0) begin failures++; $display("FAIL no normalising shift"); end
    checks++; if (n_noshift == 0) begin failures++; $display("FAIL no unshifted product"); end
    checks++; if (n_zero    == 0) begin failures++; $display("FAIL no zero operand"); end
    checks++; if (n_inf     == 0) begin failures++; $display("FAIL no infinite operand"); end
    checks++; if (n_nan     == 0) begin failures++; $display("FAIL no NaN result"); end
    checks++; if (n_ovf     == 0) begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_udf     == 0) begin failures++; $display("FAIL no underflow"); end
    checks++; if (n_neg     == 0) begin failures++; $display("FAIL no negative result"); end
    $display("mechanisms: handshakes=%0d shift=%0d noshift=%0d zero=%0d inf=%0d nan=%0d overflow=%0d underflow=%0d negative=%0d",
             n_hs, n_shift, n_noshift, n_zero, n_inf, n_nan, n_ovf, n_udf, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
