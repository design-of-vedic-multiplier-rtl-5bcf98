// tb_bist_lfsr -- checks the pattern generator.
// A 16-bit instance must hold its seed while disabled, follow a
// step model written out from its polynomial, and return to the seed after
// exactly 65535 steps (maximal length) without revisiting it earlier. The
// 64-bit default instance is compared with the model for 2000 steps.
module tb_bist_lfsr;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic en16 = 0, en64 = 0;
  logic [15:0] q16;
  logic [63:0] q64;

  always #5 clk = ~clk;

  // x^16 + x^15 + x^13 + x^4 + 1
  bist_lfsr #(.W(16), .TAPS(16'hD008), .SEED(16'h0001)) dut16 (.clk(clk), .en(en16), .q(q16));
  bist_lfsr dut64 (.clk(clk), .en(en64), .q(q64));

  function automatic logic [15:0] step16(logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction
  function automatic logic [63:0] step64(logic [63:0] s);
    return {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m16;
    logic [63:0] m64;
    int period;
    repeat (3) @(posedge clk);
    #1;
    check(q16 == 16'h0001, "16-bit holds seed while disabled");
    check(q64 == '1, "64-bit holds seed while disabled");
    en16 = 1; en64 = 1;
    m16 = 16'h0001; m64 = '1;
    period = 0;
    do begin
      @(posedge clk); #1;
      m16 = step16(m16);
      period++;
      if (period <= 2000) begin
        m64 = step64(m64);
        check(q64 == m64, "64-bit step");
      end
      if (q16 != m16) begin
        check(0, "16-bit step");
        break;
      end
    end while (q16 != 16'h0001 && period < 70000);
    check(period == 65535, "16-bit period is 2^16-1");
    // disable: back to seed on the next edge
    en16 = 0; en64 = 0;
    @(posedge clk); #1;
    check(q16 == 16'h0001 && q64 == '1, "reload seed when disabled");
    en64 = 1;
    @(posedge clk); #1;
    check(q64 == step64('1), "first step after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
