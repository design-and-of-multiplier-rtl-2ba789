// approx_adder: approximate 1-bit full adder.
//
// The carry is the exact majority of the three inputs, built from three
// two-input ANDs and two two-input ORs; the sum is simply the inverted carry.
// The sum is therefore right whenever one or two inputs are set and wrong for
// the all-zero and all-one input patterns (6 of 8 patterns correct), with an
// error of +1 for 000 and -1 for 111. The gate types follow the source's
// circuit. Combinational.
module approx_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic ab, bc, ac;
  assign ab    = a & b;
  assign bc    = b & c;
  assign ac    = a & c;
  assign carry = (ab | bc) | ac;
  assign sum   = ~carry;
endmodule
