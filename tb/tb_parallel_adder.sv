// tb_parallel_adder: exhaustive check of the 4-bit adder and a random check
// of a 32-bit one against the + operator.
module tb_parallel_adder;
  logic [3:0]  a4, b4, s4;
  logic        c4;
  logic [31:0] a32, b32, s32;
  logic        c32;
  int checks = 0, failures = 0;

  parallel_adder #(.W(4))  dut4  (.a(a4),  .b(b4),  .s(s4),  .cout(c4));
  parallel_adder #(.W(32)) dut32 (.a(a32), .b(b32), .s(s32), .cout(c32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a32 = '0; b32 = '0;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      checks++;
      if ({c4, s4} != 5'(a4) + 5'(b4)) begin
        failures++;
        $display("FAIL %0d + %0d -> %0d", a4, b4, {c4, s4});
      end
    end
    for (int v = 0; v < 2000; v++) begin
      a32 = $urandom;
      b32 = (v == 0) ? ~a32 + 32'd1 : $urandom;
      #1;
      checks++;
      if ({c32, s32} != 33'(a32) + 33'(b32)) begin
        failures++;
        $display("FAIL %h + %h -> %h", a32, b32, {c32, s32});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
