// tb_comp53_aa: exhaustive check of comp53_aa over all 32 input patterns against the
// arithmetic model in tb_model_pkg, plus the number of patterns whose output
// equals the exact count (expected 24 of 32).
module tb_comp53_aa;
  import tb_model_pkg::*;
  logic [4:0] x;
  logic [2:0] o;
  int checks = 0, failures = 0, exact = 0;

  comp53_aa dut (.x(x), .o(o));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (int'(o) != c53_model(K_AA, x)) begin
        failures++;
        $display("FAIL x=%b o=%0d expected %0d", x, o, c53_model(K_AA, x));
      end
      if (int'(o) == $countones(x)) exact++;
    end
    checks++;
    if (exact != 24) begin
      failures++;
      $display("FAIL pass count %0d, expected 24", exact);
    end
    $display("pass rate %0d/32", exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
