// tb_model_pkg: reference models for the multiplier testbenches.
//
// The models count bits arithmetically instead of copying the gate
// structure of the RTL. c53_model gives the value of the three 5-3
// compressor variants (exact count; the multiplexer variant reads 0 when
// exactly one of x[3], x[4] and all of x[0..2] are set; the
// approximate-adder variant is off by +1 when x[0..2] = 000 and by -1 when
// x[0..2] = 111). c154_model applies them to the five full-adder sums and
// carries of a 15-4 compressor. tree_model evaluates a whole 16 x 16
// partial product array: columns 12..17 go through 15-4 compressors (the
// first three of the requested design, the rest accurate), everything else
// is added exactly.
package tb_model_pkg;

  localparam int K_EXACT = 0;
  localparam int K_MUX   = 1;
  localparam int K_AA    = 2;

  function automatic int c53_model(int kind, logic [4:0] x);
    int n;
    n = $countones(x);
    if (kind == K_MUX && (x[3] != x[4]) && x[2:0] == 3'b111) n = 0;
    if (kind == K_AA && x[2:0] == 3'b000) n = n + 1;
    if (kind == K_AA && x[2:0] == 3'b111) n = n - 1;
    return n;
  endfunction

  // dsg (design): 0 accurate, 1, 2, 4 as in the RTL
  function automatic int c154_model(int dsg, logic [14:0] x);
    logic [4:0] s, c;
    int ks, kc, n;
    for (int k = 0; k < 5; k++) begin
      n = int'(x[3*k]) + int'(x[3*k+1]) + int'(x[3*k+2]);
      s[k] = n[0];
      c[k] = n[1];
    end
    case (dsg)
      0: begin ks = K_EXACT; kc = K_EXACT; end
      1: begin ks = K_MUX;   kc = K_MUX;   end
      2: begin ks = K_AA;    kc = K_AA;    end
      default: begin ks = K_AA; kc = K_MUX; end
    endcase
    return (c53_model(ks, s) + 2 * c53_model(kc, c)) % 16;
  endfunction

  function automatic logic [31:0] tree_model(logic [15:0] pp [16], int dsg);
    longint unsigned total;
    logic [14:0] x;
    int lo, hi, k;
    total = 0;
    for (int c = 0; c < 31; c++) begin
      lo = (c < 16) ? 0 : c - 15;
      hi = (c < 16) ? c : 15;
      if (c >= 12 && c < 18) begin
        x = '0;
        k = 0;
        for (int i = lo; i <= hi; i++) begin
          if (k < 15) x[k] = pp[i][c-i];
          else total += longint'(pp[i][c-i]) << c;
          k++;
        end
        total += longint'(c154_model((c < 15) ? dsg : 0, x)) << c;
      end else begin
        for (int i = lo; i <= hi; i++) total += longint'(pp[i][c-i]) << c;
      end
    end
    return total[31:0];
  endfunction

  function automatic logic [31:0] mult_model(logic [15:0] a, logic [15:0] b, int dsg);
    logic [15:0] pp [16];
    for (int i = 0; i < 16; i++) pp[i] = a & {16{b[i]}};
    return tree_model(pp, dsg);
  endfunction

endpackage
