// bist_size_run -- runs the self-testing Vedic multiplier at one size N.
// Used by tb_bist_sizes. It multiplies random operands in normal mode, then
// runs one self-test session of NPAT patterns with the Vedic product
// corrupted on one cycle, and checks every product against a shift-and-add
// model and the final counts against NPAT-1 / 1 / floor(100*(NPAT-1)/NPAT).
// TAPS is the pattern generator's feedback polynomial as a bit mask (bit i
// for x^(i+1)), given by the caller from the polynomial table.
module bist_size_run #(
  parameter int unsigned N    = 16,
  parameter logic [N-1:0] TAPS = '0,
  parameter int unsigned NPAT = 100
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  logic bist_on = 0;
  logic [N-1:0] a = '0, b = '0;
  logic [2*N-1:0] y;
  logic correct;

  vedic_mult_64bit_using_BIST #(.N(N)) dut (.a(a), .b(b), .bist_on(bist_on), .clk(clk), .y(y), .correct(correct));

  function automatic logic [2*N-1:0] shift_add(logic [N-1:0] x, logic [N-1:0] z);
    logic [2*N-1:0] acc = '0;
    for (int i = 0; i < N; i++)
      if (z[i]) acc = acc + ((2*N)'(x) << i);
    return acc;
  endfunction

  function automatic logic [N-1:0] reverse(logic [N-1:0] s);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = s[N-1-i];
    return r;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d %s", N, what);
    end
  endtask

  initial begin
    logic [N-1:0] pat;
    int exp_perf;
    done = 0; checks = 0; failures = 0;
    repeat (2) @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      a = N'({$urandom, $urandom}); b = N'({$urandom, $urandom}); #1;
      check(y == shift_add(a, b) && correct, "normal-mode product");
    end
    @(negedge clk);
    bist_on = 1;
    pat = '1;
    for (int i = 0; i < int'(NPAT); i++) begin
      #1;
      if (i == 5) begin
        force dut.vedic_p = shift_add(pat, reverse(pat)) ^ (2*N)'(1) << N;
        #1 check(!correct, "corrupted product detected");
        @(posedge clk);
        #1 release dut.vedic_p;
      end else begin
        check(y == shift_add(pat, reverse(pat)) && correct, "self-test product");
        @(posedge clk);
      end
      pat = {pat[N-2:0], ^(pat & TAPS)};
      @(negedge clk);
    end
    bist_on = 0;
    exp_perf = (100 * (int'(NPAT) - 1)) / int'(NPAT);
    check(dut.correct_out == 32'(NPAT - 1) && dut.incorrect_out == 32'd1 &&
          dut.performance == 7'(exp_perf), "final counts");
    $display("N=%0d: correct_out=%0d incorrect_out=%0d performance=%0d", N,
             dut.correct_out, dut.incorrect_out, dut.performance);
    done = 1;
  end
endmodule
