// tb_pp_gen: random check of every partial product bit, pp[i][j] = a[j] & b[i].
module tb_pp_gen;
  logic [15:0] a, b;
  logic [15:0] pp [16];
  int checks = 0, failures = 0;

  pp_gen #(.N(16)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 200; v++) begin
      a = (v == 0) ? 16'hffff : 16'($urandom);
      b = (v == 0) ? 16'hffff : 16'($urandom);
      #1;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          checks++;
          if (pp[i][j] != (a[j] && b[i])) begin
            failures++;
            $display("FAIL pp[%0d][%0d] a=%h b=%h", i, j, a, b);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
