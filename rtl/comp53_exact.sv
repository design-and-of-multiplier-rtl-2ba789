// comp53_exact: accurate 5-3 compressor (counter of five equal-weight bits).
//
// o = x[0] + x[1] + x[2] + x[3] + x[4], as a 3-bit number {O2, O1, O0}.
// Structure: five XORs, two 2-1 multiplexers and one AND. XOR1 = x0^x1,
// XOR2 = x2^x3, XOR3 = XOR1^XOR2. The first multiplexer gives the carry of
// x0..x2 (XOR1 ? x2 : x0), the second the carry of XOR3 and x3, x4
// (XOR3 ? x4 : x3); O0 = XOR3 ^ x4 (three XOR levels), O1 = XOR of the two
// multiplexer outputs, O2 = AND of them. The gate list follows the circuit
// it was taken from; which signal drives each multiplexer select is this
// design's choice, made so that the count is exact. Combinational.
module comp53_exact (
  input  logic [4:0] x,
  output logic [2:0] o
);
  logic xor1, xor2, xor3, mux1, mux2;
  assign xor1 = x[0] ^ x[1];
  assign xor2 = x[2] ^ x[3];
  assign xor3 = xor1 ^ xor2;
  assign mux1 = xor1 ? x[2] : x[0];
  assign mux2 = xor3 ? x[4] : x[3];
  assign o[0] = xor3 ^ x[4];
  assign o[1] = mux1 ^ mux2;
  assign o[2] = mux1 & mux2;
endmodule
