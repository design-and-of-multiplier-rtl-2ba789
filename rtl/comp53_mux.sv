// comp53_mux: approximate 5-3 compressor built from three 4-1 multiplexers.
//
// Inputs A, B, C = x[0], x[1], x[2] are combined into data signals, and
// D, E = x[3], x[4] drive the selects of all three multiplexers, so the path
// from D and E to the outputs is a single multiplexer. With s = A^B^C,
// m = majority(A,B,C) and t = "one or two of A,B,C set":
//   O0  = mux(DE: 00 -> s,  01 -> ~s, 10 -> ~s, 11 -> s)     exact
//   O1  = mux(DE: 00 -> m,  01 -> t,  10 -> t,  11 -> ~m)    exact
//   O2' = mux(DE: 00 -> 0,  01 -> 0,  10 -> 0,  11 -> m)     approximate
// The exact O2 would need A&B&C on the 01/10 inputs; dropping it saves the
// three-input AND. The result is wrong only when exactly one of D, E and all
// of A, B, C are set (2 of 32 patterns, pass rate 93.75 %), where it reads
// 0 instead of 4.
// The multiplexer organisation (three 4-1 muxes, D and E as selects, A, B, C
// as data) and the approximated O2 follow the source; the data equations and
// the choice of which term to drop are this design's own. Combinational.
module comp53_mux (
  input  logic [4:0] x,
  output logic [2:0] o
);
  logic a, b, c;
  logic [1:0] sel;
  logic s, m, t;
  logic [3:0] d0, d1, d2;

  assign {c, b, a} = x[2:0];
  assign sel = {x[3], x[4]};

  assign s = a ^ b ^ c;
  assign m = (a & b) | (b & c) | (a & c);
  assign t = (a | b | c) & ~(a & b & c);

  // data inputs, index = {D, E}
  assign d0 = {s, ~s, ~s, s};
  assign d1 = {~m, t, t, m};
  assign d2 = {m, 1'b0, 1'b0, 1'b0};

  mux4 u_mx1 (.d(d0), .sel(sel), .y(o[0]));
  mux4 u_mx2 (.d(d1), .sel(sel), .y(o[1]));
  mux4 u_mx3 (.d(d2), .sel(sel), .y(o[2]));
endmodule
