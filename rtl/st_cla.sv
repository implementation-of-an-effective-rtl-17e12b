// st_cla: self-timed (dual-rail) carry look-ahead adder with completion
// detection.
//
// Every bit travels on two wires, a true rail and a false rail. Both rails
// low is the empty "spacer" state; exactly one rail high is a valid 1 or 0.
// Each bit then knows for itself whether it generates a carry (both inputs
// 1), kills it (both 0) or propagates the incoming one (one of each), so a
// carry is resolved as soon as the input bits decide it. The true-rail
// carries are the ordinary look-ahead carries from generate and propagate;
// the false-rail carries are the same look-ahead expression with "kill" in
// place of "generate". Both are produced by one cla_carry_gen instance each.
// A sum bit becomes valid once its propagate and its carry are valid.
//
// done goes high when every sum bit and the carry-out hold a valid code,
// and low again once the inputs return to the spacer, so it serves as the
// acknowledge of a four-phase (return-to-zero) handshake. The circuit is
// monotonic: from the spacer, rails only rise until done, and with the
// inputs back at the spacer they all fall.
// Combinational. WIDTH defaults to 8, the exponent width it adds.
module st_cla #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a_t, a_f,    // operand A, dual rail
  input  logic [WIDTH-1:0] b_t, b_f,    // operand B, dual rail
  input  logic             cin_t, cin_f,
  output logic [WIDTH-1:0] sum_t, sum_f,
  output logic             cout_t, cout_f,
  output logic             done         // all outputs hold valid codes
);
  logic [WIDTH-1:0] gen, kill, prop_t, prop_f;
  logic [WIDTH:0]   c_t, c_f;

  assign gen    = a_t & b_t;
  assign kill   = a_f & b_f;
  assign prop_t = (a_t & b_f) | (a_f & b_t);  // half sum is 1
  assign prop_f = gen | kill;                  // half sum is 0

  cla_carry_gen #(.WIDTH(WIDTH)) u_carry_t (.g(gen),  .p(prop_t), .c0(cin_t), .c(c_t));
  cla_carry_gen #(.WIDTH(WIDTH)) u_carry_f (.g(kill), .p(prop_t), .c0(cin_f), .c(c_f));

  assign sum_t  = (prop_t & c_f[WIDTH-1:0]) | (prop_f & c_t[WIDTH-1:0]);
  assign sum_f  = (prop_t & c_t[WIDTH-1:0]) | (prop_f & c_f[WIDTH-1:0]);
  assign cout_t = c_t[WIDTH];
  assign cout_f = c_f[WIDTH];

  assign done = (&(sum_t | sum_f)) & (cout_t | cout_f);

  // Dual-rail code rules: an input bit never has both rails high, and then
  // no output bit does either.
  always_comb begin
    assert final ((~|(a_t & a_f)) && (~|(b_t & b_f)) && !(cin_t && cin_f))
      else $error("st_cla: input bit with both rails high");
    assert final ((~|(sum_t & sum_f)) && !(cout_t && cout_f))
      else $error("st_cla: output bit with both rails high");
  end
endmodule
