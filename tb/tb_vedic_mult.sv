// tb_vedic_mult -- checks the recursive Vedic multiplier at several sizes.
// N = 4 and N = 8 are checked exhaustively; N = 64 (the default) with corner
// cases, the decimal worked example 576 x 324 = 186624, and random operands.
// Expected products come from a shift-and-add model in this testbench.
module tb_vedic_mult;
  int checks = 0, failures = 0;

  logic [3:0]   a4, b4;   logic [7:0]   p4;
  logic [7:0]   a8, b8;   logic [15:0]  p8;
  logic [63:0]  a64, b64; logic [127:0] p64;

  vedic_mult #(.N(4)) dut4  (.a(a4), .b(b4), .p(p4));
  vedic_mult #(.N(8)) dut8  (.a(a8), .b(b8), .p(p8));
  vedic_mult          dut64 (.a(a64), .b(b64), .p(p64));

  function automatic logic [127:0] shift_add(logic [63:0] x, logic [63:0] y);
    logic [127:0] acc = '0;
    for (int i = 0; i < 64; i++)
      if (y[i]) acc = acc + (128'(x) << i);
    return acc;
  endfunction

  task automatic check64(logic [63:0] x, logic [63:0] y);
    logic [127:0] e;
    a64 = x; b64 = y; #1;
    e = shift_add(x, y);
    checks++;
    if (p64 !== e) begin
      failures++;
      $display("FAIL 64: %h x %h = %h, expected %h", x, y, p64, e);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (int'(p4) != i * j) begin
          failures++;
          $display("FAIL 4: %0d x %0d = %0d", i, j, p4);
        end
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks++;
        if (int'(p8) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL 8: %0d x %0d = %0d", i, j, p8);
        end
      end
    // worked decimal example of the method: 576 x 324 = 186624
    a64 = 64'd576; b64 = 64'd324; #1;
    checks++;
    if (p64 != 128'd186624) begin
      failures++;
      $display("FAIL 576 x 324 = %0d", p64);
    end
    check64('0, '0);
    check64('1, '1);
    check64('1, 64'd1);
    check64(64'd1, '1);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check64(64'hFFFF_FFFF_0000_0000, 64'h0000_0000_FFFF_FFFF);
    check64(64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555);
    for (int k = 0; k < 5000; k++)
      check64({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
