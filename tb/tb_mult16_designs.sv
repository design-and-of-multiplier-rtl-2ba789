// tb_mult16_designs: the other multiplier variants. The accurate
// multiplier must return a*b exactly; multipliers 2 and 4 must match the
// arithmetic model of their compressors. Random and corner operands.
module tb_mult16_designs;
  import mult_pkg::*;
  import tb_model_pkg::*;
  logic [15:0] a, b;
  logic [31:0] p0, p2, p4;
  int checks = 0, failures = 0, d2 = 0, d4 = 0;

  mult16 #(.DESIGN(ACCURATE)) dut0 (.a(a), .b(b), .p(p0));
  mult16 #(.DESIGN(DESIGN2))  dut2 (.a(a), .b(b), .p(p2));
  mult16 #(.DESIGN(DESIGN4))  dut4 (.a(a), .b(b), .p(p4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h * %h = %h, expected %h", name, a, b, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 10000; v++) begin
      a = (v == 0) ? 16'hffff : 16'($urandom);
      b = (v == 0) ? 16'hffff : 16'($urandom);
      #1;
      check("accurate", p0, 32'(a) * 32'(b));
      check("design2", p2, mult_model(a, b, 2));
      check("design4", p4, mult_model(a, b, 4));
      if (p2 != p0) d2++;
      if (p4 != p0) d4++;
    end
    checks++;
    if (d2 == 0 || d4 == 0) begin
      failures++;
      $display("FAIL an approximate multiplier never differed from the exact one");
    end
    $display("inexact products of 10000: multiplier 2 %0d, multiplier 4 %0d", d2, d4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
