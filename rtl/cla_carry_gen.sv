// cla_carry_gen: carry generation logic of the carry look-ahead adder.
//
// Every carry is computed directly from the generate and propagate terms
// of the bits below it and the carry-in, without waiting for the carry of
// the previous bit to settle:
//   c[i+1] = g[i] | p[i]&g[i-1] | p[i]&p[i-1]&g[i-2] | ... | p[i]&...&p[0]&c0
// The expansion is written out as a two-level sum of products for every
// carry, so the depth does not grow with the bit position (only the fan-in
// does). c[0] is the carry-in itself; c[WIDTH] is the carry-out.
// Combinational. WIDTH defaults to 4, the size of the adder drawing.
module cla_carry_gen #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] g,    // generate of each bit
  input  logic [WIDTH-1:0] p,    // propagate of each bit
  input  logic             c0,   // carry-in
  output logic [WIDTH:0]   c     // c[i] = carry into bit i, c[WIDTH] = carry-out
);
  always_comb begin
    logic term;
    c[0] = c0;
    for (int i = 0; i < WIDTH; i++) begin
      // carry-in term: all propagates p[i]..p[0] and c0
      term = c0;
      for (int k = 0; k <= i; k++) term = term & p[k];
      c[i+1] = term;
      // one product term per generate g[j]: g[j] & p[i]..p[j+1]
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term = term & p[k];
        c[i+1] = c[i+1] | term;
      end
    end
  end
endmodule
