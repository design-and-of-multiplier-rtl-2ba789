// tb_mult16: end-to-end test of the multiplier at its default
// configuration (16 x 16, design 1 compressors).
//
// Drives corner operands and 20000 random pairs, compares every product with
// the arithmetic model of the approximate multiplier, and measures it
// against the exact product a*b: pass rate, mean and maximum error distance.
// Mechanisms counted: products where the approximation changed the result
// and products that came out exact; each must occur at least once.
module tb_mult16;
  import tb_model_pkg::*;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int n_err = 0, n_exact = 0;
  longint unsigned ed_sum = 0, ed_max = 0;

  mult16 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y);
    logic [31:0] exp_p, ex;
    longint unsigned ed;
    a = x;
    b = y;
    #1;
    exp_p = mult_model(x, y, 1);
    ex = 32'(x) * 32'(y);
    checks++;
    if (p != exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp_p);
    end
    if (p == ex) n_exact++;
    else n_err++;
    ed = (p > ex) ? longint'(p - ex) : longint'(ex - p);
    ed_sum += ed;
    if (ed > ed_max) ed_max = ed;
  endtask

  initial begin
    int total;
    apply(16'h0000, 16'h0000);
    apply(16'hffff, 16'hffff);
    apply(16'hffff, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'h1234, 16'h5678);
    for (int v = 0; v < 20000; v++) apply(16'($urandom), 16'($urandom));
    total = n_err + n_exact;
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("FAIL the approximation never changed a product");
    end
    checks++;
    if (n_exact == 0) begin
      failures++;
      $display("FAIL no product came out exact");
    end
    $display("products %0d: exact %0d, approximate %0d, mean error distance %0d, max %0d",
             total, n_exact, n_err, ed_sum / longint'(total), ed_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
