// pp_tree: partial product reduction tree of the 16x16 multiplier.
//
// Input: the 16 x 16 partial product bits, pp[i][j] of weight 2^(i+j).
// Output: two 32-bit rows whose sum is the (approximate) product.
//
// Stage 1 places six 15-4 compressors in product columns 12..17 (0-based;
// the 13th to 18th columns when counted from 1). Each takes the first 15
// bits of its column, pp rows in increasing order as X0, X1, ...; columns
// 12 and 13 hold only 13 and 14 bits and are padded with zeros on the
// highest X inputs, and column 15 keeps its 16th bit for later. Compressor
// outputs O0..O3 land in columns j..j+3. The compressors in columns 12..14
// are of type DESIGN, those in 15..17 are accurate. All other bits pass to
// the next stage untouched.
//
// The remaining stages are exact and follow a Dadda schedule: stage k
// brings every column down to at most 13, 9, 6, 4, 3 and finally 2 bits,
// counting the carries that arrive from the column below in the same
// stage. In each column a 4-2 compressor (four inputs plus carry in taken
// from the same column; sum stays, carry and carry out move up) is used
// while four or more bits must go, then full adders while two or more must
// go, then a half adder; the rest passes through. Column heights, bit
// positions and the component counts are computed once at elaboration into
// the packed table GEOM, so the tree itself is only wiring and instances.
// Bit k of column c in stage s sits at position offset(s, c) + k of that
// stage's vector g_st[s].bits.
//
// The placement and mix of the 15-4 compressors follow the source; the
// padding position, the input order and the schedule of the exact stages
// (the source says only that 4-2 compressors, half and full adders are
// used) are this design's own. Combinational.
module pp_tree
  import mult_pkg::*;
#(
  parameter c154_design_e DESIGN = DESIGN1
) (
  input  logic [N-1:0]  pp [N],
  output logic [PW-1:0] row0,
  output logic [PW-1:0] row1
);
  localparam int NC   = PW;     // product columns
  localparam int MAXB = N * N;  // room for one stage's bits

  // ---- stage 1 geometry ------------------------------------------------
  function automatic int h0(int c);           // partial products in column c
    if (c < 0 || c > 2 * N - 2) return 0;
    return (c < N) ? c + 1 : 2 * N - 1 - c;
  endfunction

  function automatic int lo_row(int c);       // lowest pp row present in column c
    return (c < N) ? 0 : c - (N - 1);
  endfunction

  function automatic bit is_cmp(int c);       // column holds a 15-4 compressor
    return (c >= C154_FIRST) && (c < C154_FIRST + C154_COUNT);
  endfunction

  function automatic int raw(int c);          // pp bits of column c not compressed
    if (is_cmp(c)) return (h0(c) > 15) ? h0(c) - 15 : 0;
    return h0(c);
  endfunction

  function automatic int cmp_lo(int c);       // lowest compressor column with an output in c
    return (c - 3 > int'(C154_FIRST)) ? c - 3 : int'(C154_FIRST);
  endfunction

  function automatic int cmp_hi(int c);       // highest compressor column with an output in c
    return (c < int'(C154_FIRST + C154_COUNT) - 1) ? c : int'(C154_FIRST + C154_COUNT) - 1;
  endfunction

  function automatic int h1(int c);           // height of column c after stage 1
    int n;
    n = cmp_hi(c) - cmp_lo(c) + 1;
    return raw(c) + ((n > 0) ? n : 0);
  endfunction

  // ---- exact stages (Dadda schedule) ------------------------------------
  // Stage s reduces every column to at most target(s) bits, counting the
  // carries that arrive from the column below in the same stage. Targets
  // are the Dadda sequence 2, 3, 4, 6, 9, 13, ... below the tallest column.
  // Per column, greedily: a 4-2 compressor (5 bits in, 1 stays) while at
  // least four bits must go, else a full adder (3 in, 1 stays) while at
  // least two must go, else a half adder.

  function automatic int dadda(int k);
    int d;
    d = 2;
    for (int i = 0; i < k; i++) d = (d * 3) / 2;
    return d;
  endfunction

  function automatic int num_stages();
    int hmax, k;
    hmax = 0;
    for (int c = 0; c < NC; c++) if (h1(c) > hmax) hmax = h1(c);
    k = 0;
    while (dadda(k) < hmax) k++;
    return k;
  endfunction

  localparam int NS  = num_stages();
  localparam int ENT = (NS + 1) * (NC + 1);

  // entry fields: [7:0] height, [17:8] offset, [21:18] 4-2 count,
  // [25:22] full adder count, [29:26] half adder count
  function automatic logic [32*ENT-1:0] geom();
    logic [32*ENT-1:0] g;
    int h  [NC];
    int hn [NC];
    int o, t, inc, rem, need, n4, f, ha;
    g = '0;
    for (int k = 0; k < NC; k++) h[k] = h1(k);
    for (int s = 0; s <= NS; s++) begin
      t   = (s < NS) ? dadda(NS - 1 - s) : 1 << 16;
      o   = 0;
      inc = 0;
      for (int k = 0; k < NC; k++) begin
        rem = h[k]; need = h[k] + inc - t; n4 = 0; f = 0; ha = 0;
        while (need > 0 && rem >= 2) begin
          if (need >= 4 && rem >= 5) begin n4++; rem -= 5; need -= 4; end
          else if (need >= 2 && rem >= 3) begin f++; rem -= 3; need -= 2; end
          else begin ha++; rem -= 2; need -= 1; end
        end
        g[32*(s*(NC+1)+k) +: 32] = {2'b0, 4'(ha), 4'(f), 4'(n4), 10'(o), 8'(h[k])};
        o += h[k];
        hn[k] = h[k] - 4 * n4 - 2 * f - ha + inc;
        inc   = 2 * n4 + f + ha;
      end
      g[32*(s*(NC+1)+NC) +: 32] = {14'b0, 10'(o), 8'(o)};
      h = hn;
    end
    return g;
  endfunction

  localparam logic [32*ENT-1:0] GEOM = geom();

  function automatic int height(int s, int c);
    return int'(GEOM[32*(s*(NC+1)+c) +: 8]);
  endfunction

  function automatic int offset(int s, int c);   // c = NC gives the stage total
    return int'(GEOM[32*(s*(NC+1)+c) + 8 +: 10]);
  endfunction

  function automatic int n42(int s, int c);
    return int'(GEOM[32*(s*(NC+1)+c) + 18 +: 4]);
  endfunction

  function automatic int nfa(int s, int c);
    return int'(GEOM[32*(s*(NC+1)+c) + 22 +: 4]);
  endfunction

  function automatic int nha(int s, int c);
    return int'(GEOM[32*(s*(NC+1)+c) + 26 +: 4]);
  endfunction

  // bits of column c that stay in it when going from stage s to s+1
  function automatic int nstay(int s, int c);
    return height(s, c) - 4 * n42(s, c) - 2 * nfa(s, c) - nha(s, c);
  endfunction

  // ---- stage vectors -----------------------------------------------------
  for (genvar s = 0; s <= NS; s++) begin : g_st
    localparam int TOT = height(s, NC);
    logic [MAXB-1:0] bits;

    assign bits[MAXB-1:TOT] = '0;

    if (s == 0) begin : g_first
      // 15-4 compressors
      for (genvar j = C154_FIRST; j < C154_FIRST + C154_COUNT; j++) begin : g_c154
        localparam c154_design_e D = (j - C154_FIRST < C154_APPROX) ? DESIGN : ACCURATE;
        localparam int LO = lo_row(j);
        logic [14:0] x;
        logic [3:0]  o;
        for (genvar k = 0; k < 15; k++) begin : g_in
          if (k < h0(j)) begin : g_pp
            assign x[k] = pp[LO+k][j-LO-k];
          end else begin : g_zero
            assign x[k] = 1'b0;
          end
        end
        comp154 #(.DESIGN(D)) u_c154 (.x(x), .o(o));
        for (genvar t = 0; t < 4; t++) begin : g_out
          assign bits[offset(0, j+t) + raw(j+t) + (j - cmp_lo(j+t))] = o[t];
        end
      end
      // bits that bypass the compressors
      for (genvar c = 0; c < NC; c++) begin : g_col
        localparam int LO   = lo_row(c);
        localparam int SKIP = is_cmp(c) ? 15 : 0;
        for (genvar k = 0; k < raw(c); k++) begin : g_raw
          assign bits[offset(0, c) + k] = pp[LO+SKIP+k][c-LO-SKIP-k];
        end
      end
    end else begin : g_red
      for (genvar c = 0; c < NC; c++) begin : g_col
        localparam int BP  = offset(s-1, c);       // column start, previous stage
        localparam int BN  = offset(s, c);         // column start, this stage
        localparam int N42 = n42(s-1, c);
        localparam int NFA = nfa(s-1, c);
        localparam int NHA = nha(s-1, c);
        localparam int NPS = height(s-1, c) - 5 * N42 - 3 * NFA - 2 * NHA;
        localparam int IB  = BP + 5 * N42 + 3 * NFA + 2 * NHA;   // first passed bit
        // where this column's carries go in column c+1 of this stage
        localparam int BU  = (c + 1 < NC) ? offset(s, c+1) + nstay(s-1, c+1) : 0;
        if (c == NC - 1 && (N42 + NFA + NHA) > 0) begin : g_err
          $error("pp_tree: top column would produce a carry");
        end
        for (genvar k = 0; k < N42; k++) begin : g_42
          comp42 u_42 (
            .x    (g_st[s-1].bits[BP+5*k +: 4]),
            .cin  (g_st[s-1].bits[BP+5*k+4]),
            .sum  (bits[BN+k]),
            .carry(bits[BU+2*k]),
            .cout (bits[BU+2*k+1]));
        end
        for (genvar k = 0; k < NFA; k++) begin : g_fa
          full_adder u_fa (
            .a    (g_st[s-1].bits[BP+5*N42+3*k]),
            .b    (g_st[s-1].bits[BP+5*N42+3*k+1]),
            .c    (g_st[s-1].bits[BP+5*N42+3*k+2]),
            .sum  (bits[BN+N42+k]),
            .carry(bits[BU+2*N42+k]));
        end
        for (genvar k = 0; k < NHA; k++) begin : g_ha
          half_adder u_ha (
            .a    (g_st[s-1].bits[BP+5*N42+3*NFA+2*k]),
            .b    (g_st[s-1].bits[BP+5*N42+3*NFA+2*k+1]),
            .sum  (bits[BN+N42+NFA+k]),
            .carry(bits[BU+2*N42+NFA+k]));
        end
        for (genvar k = 0; k < NPS; k++) begin : g_pass
          assign bits[BN+N42+NFA+NHA+k] = g_st[s-1].bits[IB+k];
        end
      end
    end
  end

  // ---- two rows for the final adder ---------------------------------------
  for (genvar c = 0; c < NC; c++) begin : g_rows
    localparam int H = height(NS, c);
    localparam int B = offset(NS, c);
    if (H >= 1) begin : g_r0
      assign row0[c] = g_st[NS].bits[B];
    end else begin : g_r0z
      assign row0[c] = 1'b0;
    end
    if (H >= 2) begin : g_r1
      assign row1[c] = g_st[NS].bits[B+1];
    end else begin : g_r1z
      assign row1[c] = 1'b0;
    end
  end
endmodule
