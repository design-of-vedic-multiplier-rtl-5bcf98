// tb_product_compare -- equal and single-bit-different product pairs.
module tb_product_compare;
  int checks = 0, failures = 0;
  logic [127:0] x, y;
  logic equal;

  product_compare dut (.x(x), .y(y), .equal(equal));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      y = x;
      #1;
      checks++;
      if (equal !== 1'b1) begin failures++; $display("FAIL equal pair"); end
      y[k % 128] = ~y[k % 128];   // every bit position is tried twice
      #1;
      checks++;
      if (equal !== 1'b0) begin failures++; $display("FAIL bit %0d differs", k % 128); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
