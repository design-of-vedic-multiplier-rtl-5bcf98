// tb_vedic_2x2 -- exhaustive check of the 2x2 Vedic cell.
// All 16 operand pairs are applied and the product compared with a table
// worked out by hand from the decimal products (0..9).
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected[a][b], written out as decimal products
  localparam int EXP [4][4] = '{'{0, 0, 0, 0}, '{0, 1, 2, 3}, '{0, 2, 4, 6}, '{0, 3, 6, 9}};

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (int'(p) != EXP[i][j]) begin
          failures++;
          $display("FAIL %0d x %0d = %0d, expected %0d", i, j, p, EXP[i][j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
