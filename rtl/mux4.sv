// mux4: 4-to-1 multiplexer, y = d[sel], the building block of the
// multiplexer-based 5-3 compressor. Combinational.
module mux4 (
  input  logic [3:0] d,
  input  logic [1:0] sel,
  output logic       y
);
  always_comb begin
    unique case (sel)
      2'd0: y = d[0];
      2'd1: y = d[1];
      2'd2: y = d[2];
      default: y = d[3];
    endcase
  end
endmodule
