// parallel_adder: W-bit ripple-carry adder made of full adders.
//
// {cout, s} = a + b. Combinational; the carry ripples through W full
// adders. Used as the 4-bit output adder of the 15-4 compressor and as the
// final adder of the multiplier. The source calls both "parallel adders"
// without detail; ripple carry is this design's choice.
module parallel_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .sum(s[i]), .carry(c[i+1]));
  end
  assign cout = c[W];
endmodule
