// cla_adder: n-bit carry look-ahead adder.
//
// Built as in the classic carry look-ahead structure: a row of WIDTH
// carry look-ahead cells (clc) makes the generate and propagate of every
// bit, one carry generation logic block (cla_carry_gen) turns them and the
// carry-in into all carries at once, and each cell then adds its carry to
// form its sum bit. sum = a + b + cin, cout is the carry out of the top bit.
// Combinational. WIDTH defaults to 4, the size of the adder drawing; the
// multiplier uses a 10-bit instance to subtract the exponent bias.
module cla_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    clc u_clc (.a(a[i]), .b(b[i]), .c(c[i]), .g(g[i]), .p(p[i]), .s(sum[i]));
  end

  cla_carry_gen #(.WIDTH(WIDTH)) u_cgen (.g(g), .p(p), .c0(cin), .c(c));

  assign cout = c[WIDTH];
endmodule
