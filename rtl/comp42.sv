// comp42: exact 4-2 compressor with carry in and carry out.
//
// x[0] + x[1] + x[2] + x[3] + cin = sum + 2*(carry + cout).
// cout depends only on x[0..2] (it is their majority, formed by a
// multiplexer), so a chain of 4-2 compressors has no rippling carry.
// The source names the exact 4-2 compressor without giving its insides;
// this is the common carry-in/carry-out form. Combinational.
module comp42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic p01, p012, p0123;
  assign p01   = x[0] ^ x[1];
  assign p012  = p01 ^ x[2];
  assign p0123 = p012 ^ x[3];
  assign cout  = p01 ? x[2] : x[0];
  assign sum   = p0123 ^ cin;
  assign carry = p0123 ? cin : x[3];
endmodule
