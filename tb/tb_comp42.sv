// tb_comp42: exhaustive check of the 4-2 compressor: the weighted outputs
// must equal the number of ones among the five inputs, and cout must not
// depend on cin.
module tb_comp42;
  logic [3:0] x;
  logic cin, sum, carry, cout;
  int checks = 0, failures = 0;

  comp42 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      cin = 1'b0;
      #1;
      cout0 = cout;
      for (int ci = 0; ci < 2; ci++) begin
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> s=%0d c=%0d co=%0d", x, cin, sum, carry, cout);
        end
        checks++;
        if (cout != cout0) begin
          failures++;
          $display("FAIL cout depends on cin, x=%b", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
