// half_adder: exact 1-bit half adder, a + b = sum + 2*carry. Used in the
// exact stages of the partial product tree, as the source names them; the
// gates are the usual XOR and AND. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
