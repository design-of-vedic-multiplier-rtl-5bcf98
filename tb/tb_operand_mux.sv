// tb_operand_mux -- checks both select settings with random operands.
module tb_operand_mux;
  int checks = 0, failures = 0;
  logic bist_on;
  logic [63:0] ext, pattern, y;

  operand_mux dut (.bist_on(bist_on), .ext(ext), .pattern(pattern), .y(y));

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      ext = {$urandom, $urandom};
      pattern = ~ext;
      bist_on = k[0];
      #1;
      checks++;
      if (y != (k[0] ? ~ext : ext)) begin
        failures++;
        $display("FAIL sel=%0b y=%h", bist_on, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
