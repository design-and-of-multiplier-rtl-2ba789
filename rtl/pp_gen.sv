// pp_gen: partial product generation of an N x N unsigned multiplier.
//
// pp[i][j] = a[j] & b[i]; bit j of row i has weight 2^(i+j). One AND gate
// per partial product, no Booth recoding, as the dot diagram of the source
// array implies; unsigned operands are this design's choice. Combinational.
module pp_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] pp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    assign pp[i] = a & {N{b[i]}};
  end
endmodule
