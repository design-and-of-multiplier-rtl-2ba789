// tb_pp_tree: random partial product arrays (not only those of a product)
// through the reduction tree of design 1; row0 + row1 must equal the
// arithmetic model of the tree modulo 2^32. Dense arrays (most bits set)
// are mixed in to exercise the compressors' full range.
module tb_pp_tree;
  import mult_pkg::*;
  import tb_model_pkg::*;
  logic [15:0] pp [16];
  logic [31:0] row0, row1, got, exp;
  int checks = 0, failures = 0;

  pp_tree #(.DESIGN(DESIGN1)) dut (.pp(pp), .row0(row0), .row1(row1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 5000; v++) begin
      for (int i = 0; i < 16; i++) begin
        case (v % 4)
          0: pp[i] = 16'($urandom);
          1: pp[i] = 16'($urandom) | 16'($urandom);
          2: pp[i] = 16'($urandom) & 16'($urandom);
          default: pp[i] = (v < 8) ? 16'hffff : 16'($urandom) | 16'($urandom) | 16'($urandom);
        endcase
      end
      #1;
      got = row0 + row1;
      exp = tree_model(pp, 1);
      checks++;
      if (got != exp) begin
        failures++;
        if (failures < 10) $display("FAIL got %h expected %h", got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
