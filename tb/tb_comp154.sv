// tb_comp154: exhaustive check (all 32768 patterns) of the 15-4 compressor
// in its four built variants (accurate, designs 1, 2 and 4) against the
// arithmetic model. The accurate variant must also equal the plain count of
// ones. Prints the pass rate of each variant. One directed vector comes
// from a published waveform of the compressor.
module tb_comp154;
  import mult_pkg::*;
  import tb_model_pkg::*;
  logic [14:0] x;
  logic [3:0]  o0, o1, o2, o4;
  int checks = 0, failures = 0;
  int pass1 = 0, pass2 = 0, pass4 = 0;

  comp154 #(.DESIGN(ACCURATE)) dut0 (.x(x), .o(o0));
  comp154 #(.DESIGN(DESIGN1))  dut1 (.x(x), .o(o1));
  comp154 #(.DESIGN(DESIGN2))  dut2 (.x(x), .o(o2));
  comp154 #(.DESIGN(DESIGN4))  dut4 (.x(x), .o(o4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%b got %0d expected %0d", name, x, got, exp);
    end
  endtask

  initial begin
    // value pair printed at the cursor of a published waveform of this
    // compressor: X9 = X13 = 1, the other inputs shown (X7..X14) 0, and
    // O3..O0 = 0010; the inputs not shown (X0..X6) are taken as 0
    x = 15'b010_0010_0000_0000;
    #1;
    check("waveform accurate", int'(o0), 2);
    check("waveform design1", int'(o1), 2);
    for (int v = 0; v < 32768; v++) begin
      x = 15'(v);
      #1;
      check("accurate", int'(o0), $countones(x));
      check("design1", int'(o1), c154_model(1, x));
      check("design2", int'(o2), c154_model(2, x));
      check("design4", int'(o4), c154_model(4, x));
      if (int'(o1) == $countones(x)) pass1++;
      if (int'(o2) == $countones(x)) pass2++;
      if (int'(o4) == $countones(x)) pass4++;
    end
    // the approximations must actually differ from the exact count
    checks++;
    if (pass1 == 32768 || pass2 == 32768 || pass4 == 32768) begin
      failures++;
      $display("FAIL an approximate variant is exact");
    end
    $display("pass rates of 32768: design1 %0d, design2 %0d, design4 %0d", pass1, pass2, pass4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
