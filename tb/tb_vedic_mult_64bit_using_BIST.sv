// tb_vedic_mult_64bit_using_BIST -- end-to-end test of the self-testing
// 64-bit Vedic multiplier at its default size.
//
//  1. normal mode: random and corner operands on a/b; y must be the product
//     (from a shift-and-add model) and correct must be 1;
//  2. self-test session of 100 patterns: y must follow this testbench's own
//     model of the pattern sequence, and one cycle has the Vedic product
//     corrupted by a force, which must show as correct = 0; the counts must
//     end at 99 correct, 1 incorrect, performance 99;
//  3. back to normal mode: the counts must hold;
//  4. a second session of 40 patterns with one corrupted cycle: 39 / 1 / 97.
// Each mechanism (normal multiply, self-test pattern, mode switch, detected
// fault, session restart) is counted and must have happened.
module tb_vedic_mult_64bit_using_BIST;
  int checks = 0, failures = 0;
  int n_normal = 0, n_pattern = 0, n_switch = 0, n_detect = 0, n_restart = 0;

  logic clk = 0;
  logic bist_on = 0;
  logic [63:0] a = '0, b = '0;
  logic [127:0] y;
  logic correct;

  always #5 clk = ~clk;

  vedic_mult_64bit_using_BIST dut (.a(a), .b(b), .bist_on(bist_on), .clk(clk), .y(y), .correct(correct));

  function automatic logic [127:0] shift_add(logic [63:0] x, logic [63:0] z);
    logic [127:0] acc = '0;
    for (int i = 0; i < 64; i++)
      if (z[i]) acc = acc + (128'(x) << i);
    return acc;
  endfunction

  function automatic logic [63:0] reverse(logic [63:0] s);
    logic [63:0] r;
    for (int i = 0; i < 64; i++) r[i] = s[63 - i];
    return r;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic normal(logic [63:0] x, logic [63:0] z);
    a = x; b = z; #1;
    check(y == shift_add(x, z) && correct, "normal-mode product");
    n_normal++;
  endtask

  // one self-test session of n patterns; cycle bad_at gets a corrupted product
  task automatic session(int n, int bad_at);
    logic [63:0] pat = '1;   // sequence model: seed all ones
    @(negedge clk);
    bist_on = 1; n_switch++;
    a = {$urandom, $urandom}; b = {$urandom, $urandom};   // must be ignored
    for (int i = 0; i < n; i++) begin
      #1;
      if (i == bad_at) begin
        force dut.vedic_p = shift_add(pat, reverse(pat)) ^ 128'h1;
        #1;
        check(correct == 1'b0, "corrupted product detected");
        if (!correct) n_detect++;
        @(posedge clk);
        #1 release dut.vedic_p;
      end else begin
        check(y == shift_add(pat, reverse(pat)) && correct, "self-test product");
        n_pattern++;
        @(posedge clk);
      end
      pat = {pat[62:0], pat[63] ^ pat[62] ^ pat[60] ^ pat[59]};
      @(negedge clk);
    end
    bist_on = 0; n_switch++;
  endtask

  task automatic expect_counts(int ok, int bad, int perf, string what);
    checks++;
    if (dut.correct_out != 32'(ok) || dut.incorrect_out != 32'(bad) || dut.performance != 7'(perf)) begin
      failures++;
      $display("FAIL %s: %0d/%0d/%0d, expected %0d/%0d/%0d", what, dut.correct_out,
               dut.incorrect_out, dut.performance, ok, bad, perf);
    end else begin
      $display("%s: correct_out=%0d incorrect_out=%0d performance=%0d", what,
               dut.correct_out, dut.incorrect_out, dut.performance);
    end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    expect_counts(0, 0, 0, "power-up");
    normal('1, '1);
    normal(64'd576, 64'd324);
    normal('0, {$urandom, $urandom});
    for (int k = 0; k < 50; k++) normal({$urandom, $urandom}, {$urandom, $urandom});
    session(100, 63);
    expect_counts(99, 1, 99, "100-pattern session");
    repeat (5) @(posedge clk);
    normal({$urandom, $urandom}, {$urandom, $urandom});
    expect_counts(99, 1, 99, "held in normal mode");
    session(40, 12);
    n_restart++;
    expect_counts(39, 1, 97, "40-pattern session");
    check(n_normal > 0, "normal multiply happened");
    check(n_pattern > 0, "self-test pattern happened");
    check(n_switch >= 4, "mode switch happened");
    check(n_detect == 2, "corrupted products detected");
    check(n_restart > 0, "session restart happened");
    $display("mechanisms: normal=%0d pattern=%0d switch=%0d detect=%0d restart=%0d",
             n_normal, n_pattern, n_switch, n_detect, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
