// mult16: 16 x 16 unsigned approximate multiplier with 15-4 compressors.
//
// Three combinational stages: pp_gen forms the 256 AND-gate partial
// products, pp_tree reduces them to two rows (six 15-4 compressors in
// columns 12..17, the lower three approximate, then exact 4-2 compressors,
// full adders and half adders), and a 32-bit ripple-carry parallel adder adds the rows.
// DESIGN picks the approximate 15-4 compressor: DESIGN1 gives
// "multiplier 1", DESIGN2 and DESIGN4 multipliers 2 and 4, ACCURATE the
// exact reference multiplier. The product is taken modulo 2^32; the adder's
// carry out is always zero for the accurate multiplier and is dropped.
// No clock: p follows a and b after the combinational delay.
module mult16
  import mult_pkg::*;
#(
  parameter c154_design_e DESIGN = DESIGN1
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [PW-1:0] p
);
  logic [N-1:0]  pp [N];
  logic [PW-1:0] row0, row1;
  logic          cout_unused;

  pp_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));
  pp_tree #(.DESIGN(DESIGN)) u_tree (.pp(pp), .row0(row0), .row1(row1));
  parallel_adder #(.W(PW)) u_add (.a(row0), .b(row1), .s(p), .cout(cout_unused));
endmodule
