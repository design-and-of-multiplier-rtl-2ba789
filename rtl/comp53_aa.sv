// comp53_aa: approximate 5-3 compressor built around the approximate adder.
//
// The approximate adder (sum = ~majority) adds x[0..2]; an exact full adder
// adds its sum to x[3] and x[4] and gives O0; the two carries, both of
// weight 2, are merged into O1 = c1 ^ c2 and O2 = c1 & c2.
// It is wrong exactly when x[0..2] are all zero (+1) or all one (-1):
// 8 of 32 patterns, pass rate 75 %, error distance 1.
// How the approximate adder is placed in a 5-3 compressor is this design's
// own choice. Combinational.
module comp53_aa (
  input  logic [4:0] x,
  output logic [2:0] o
);
  logic s1, c1, c2;
  approx_adder u_aa (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1), .carry(c1));
  full_adder   u_fa (.a(s1), .b(x[3]), .c(x[4]), .sum(o[0]), .carry(c2));
  assign o[1] = c1 ^ c2;
  assign o[2] = c1 & c2;
endmodule
