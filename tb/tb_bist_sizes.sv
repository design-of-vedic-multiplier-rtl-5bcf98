// tb_bist_sizes -- the self-testing multiplier at the 16-bit and 32-bit
// sizes, besides the default 64-bit one. Each size multiplies in normal mode
// and runs a 100-pattern self-test session with one corrupted product.
module tb_bist_sizes;
  logic clk = 0;
  logic done16, done32;
  int c16, f16, c32, f32;

  always #5 clk = ~clk;

  // x^16 + x^15 + x^13 + x^4 + 1 and x^32 + x^22 + x^2 + x + 1
  bist_size_run #(.N(16), .TAPS(16'hD008))      run16 (.clk(clk), .done(done16), .checks(c16), .failures(f16));
  bist_size_run #(.N(32), .TAPS(32'h8020_0003)) run32 (.clk(clk), .done(done32), .checks(c32), .failures(f32));

  initial begin
    repeat (10_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32, f16 + f32 + 1);
    $finish;
  end

  initial begin
    wait (done16 && done32);
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c32, f16 + f32);
    $finish;
  end
endmodule
