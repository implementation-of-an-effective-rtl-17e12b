// clc: carry look-ahead cell, one bit of the carry look-ahead adder.
//
// Each cell looks only at its own operand bits a and b and produces the
// carry generate g (both bits 1: a carry leaves this bit whatever comes in)
// and carry propagate p (exactly one bit 1: an incoming carry passes
// through). Once the carry generation logic has delivered this bit's carry
// c, the cell forms the sum bit s = p XOR c. The cell ports (a, b, c in;
// g, p, s out) are those of the adder structure drawing. Generate is the
// AND and propagate the XOR of the inputs, the usual textbook definitions.
// Combinational.
module clc (
  input  logic a,   // operand A bit
  input  logic b,   // operand B bit
  input  logic c,   // carry into this bit, from the carry generation logic
  output logic g,   // carry generate
  output logic p,   // carry propagate
  output logic s    // sum bit
);
  assign g = a & b;
  assign p = a ^ b;
  assign s = p ^ c;
endmodule
