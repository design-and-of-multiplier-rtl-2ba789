// comp154: 15-4 compressor, counts the ones among fifteen equal-weight bits.
//
// Three stages:
//   1. five exact full adders, FA k on {x[3k+2], x[3k+1], x[3k]};
//   2. one 5-3 compressor on the five FA sums (result A2..A0, weight 1) and
//      one on the five FA carries (result B2..B0, weight 2);
//   3. a 4-bit parallel adder, o = {0, A2, A1, A0} + {B2, B1, B0, 0}.
// With exact 5-3 compressors o is the exact count (0..15). The 5-3
// compressors are chosen by DESIGN (see mult_pkg::c154_design_e); full
// adders and the parallel adder are always exact. Every 5-3 compressor used
// here returns at most 5, so o never exceeds 15 and the adder's carry out is
// always zero; it is left unused on purpose. Combinational.
module comp154
  import mult_pkg::*;
#(
  parameter c154_design_e DESIGN = DESIGN1
) (
  input  logic [14:0] x,
  output logic [3:0]  o
);
  logic [4:0] fa_s, fa_c;
  logic [2:0] a_cnt, b_cnt;
  logic       cout_unused;

  for (genvar k = 0; k < 5; k++) begin : g_fa
    full_adder u_fa (.a(x[3*k]), .b(x[3*k+1]), .c(x[3*k+2]),
                     .sum(fa_s[k]), .carry(fa_c[k]));
  end

  // 5-3 compressor on the sums (weight 1)
  if (DESIGN == ACCURATE) begin : g_sum_exact
    comp53_exact u_sum (.x(fa_s), .o(a_cnt));
  end else if (DESIGN == DESIGN1) begin : g_sum_mux
    comp53_mux   u_sum (.x(fa_s), .o(a_cnt));
  end else begin : g_sum_aa
    comp53_aa    u_sum (.x(fa_s), .o(a_cnt));
  end

  // 5-3 compressor on the carries (weight 2)
  if (DESIGN == ACCURATE) begin : g_car_exact
    comp53_exact u_car (.x(fa_c), .o(b_cnt));
  end else if (DESIGN == DESIGN2) begin : g_car_aa
    comp53_aa    u_car (.x(fa_c), .o(b_cnt));
  end else begin : g_car_mux
    comp53_mux   u_car (.x(fa_c), .o(b_cnt));
  end

  parallel_adder #(.W(4)) u_add (
    .a({1'b0, a_cnt}), .b({b_cnt, 1'b0}), .s(o), .cout(cout_unused));

endmodule
