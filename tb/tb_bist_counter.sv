// tb_bist_counter -- checks counting, the percentage and session restart.
// Session 1: 100 comparisons, one incorrect -> 99 / 1 / 99 %.
// Session 2: 40 comparisons, one incorrect  -> 39 / 1 / 97 % (truncated).
// Between sessions, with en low, the counts must hold.
module tb_bist_counter;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic en = 0, correct = 1;
  logic [31:0] correct_out, incorrect_out;
  logic [6:0] performance;

  always #5 clk = ~clk;

  bist_counter dut (.clk(clk), .en(en), .correct(correct), .correct_out(correct_out),
                    .incorrect_out(incorrect_out), .performance(performance));

  task automatic expect_counts(int ok, int bad, int perf, string what);
    checks++;
    if (correct_out != 32'(ok) || incorrect_out != 32'(bad) || performance != 7'(perf)) begin
      failures++;
      $display("FAIL %s: %0d/%0d/%0d, expected %0d/%0d/%0d", what, correct_out,
               incorrect_out, performance, ok, bad, perf);
    end
  endtask

  task automatic session(int n, int bad_at);
    en = 1;
    for (int i = 0; i < n; i++) begin
      correct = (i != bad_at);
      @(posedge clk); #1;
    end
    en = 0; correct = 1;
    @(posedge clk); #1;   // one idle cycle ends the session
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    expect_counts(0, 0, 0, "power-up");
    session(100, 37);
    expect_counts(99, 1, 99, "100-pattern session");
    correct = 0;
    repeat (5) @(posedge clk); #1;
    expect_counts(99, 1, 99, "hold while disabled");
    session(40, 0);
    expect_counts(39, 1, 97, "40-pattern session");
    session(3, -1);
    expect_counts(3, 0, 100, "all correct");
    session(2, 1);
    expect_counts(1, 1, 50, "half correct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
