// full_adder: exact 1-bit full adder.
//
// sum = a ^ b ^ c and carry = majority(a, b, c), so a + b + c = sum + 2*carry.
// Purely combinational. Used in the first stage of the 15-4 compressor, in
// the parallel adder and in the exact part of the partial product tree.
// The source only names it; the gate form is the usual one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic p;
  assign p     = a ^ b;
  assign sum   = p ^ c;
  assign carry = (a & b) | (p & c);
endmodule
