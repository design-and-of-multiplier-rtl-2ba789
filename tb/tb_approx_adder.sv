// tb_approx_adder: exhaustive check of the approximate adder. The carry
// must be the majority of the inputs and the sum its inverse; the test
// also counts the patterns whose sum matches the exact sum (expected 6).
module tb_approx_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0, exact_sums = 0;

  approx_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = 3'(v);
      #1;
      n = int'(a) + int'(b) + int'(c);
      checks++;
      if (carry != (n >= 2)) begin
        failures++;
        $display("FAIL carry a=%0d b=%0d c=%0d", a, b, c);
      end
      checks++;
      if (sum != (n < 2)) begin
        failures++;
        $display("FAIL sum a=%0d b=%0d c=%0d", a, b, c);
      end
      if (sum == n[0]) exact_sums++;
    end
    checks++;
    if (exact_sums != 6) begin
      failures++;
      $display("FAIL exact sums %0d, expected 6", exact_sums);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
