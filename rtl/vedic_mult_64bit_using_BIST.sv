// vedic_mult_64bit_using_BIST -- 64-bit Vedic multiplier with built-in self test.
//
// The multiplier itself (vedic_mult) is an N x N Urdhva Tiryakbhyam array
// built from 2x2 cells. Around it sits self-test logic that tells whether the
// array computes correctly:
//   bist_lfsr       steps through pseudo-random patterns while bist_on = 1
//   operand_mux x2  feed the array either a/b (bist_on = 0) or the pattern
//   ref_mult        a plain reference multiplier on the same operands
//   product_compare 'correct' = 1 when the Vedic and reference products agree
//   bist_counter    counts correct and incorrect comparisons during a
//                   self-test session and scores them as a percentage
// y is always the Vedic product of the selected operands.
//
// Ports are those of the published top-level entity: a, b, bist_on, clk in,
// y and correct out. The counts (correct_out, incorrect_out, performance) are
// internal signals of this module, observed in simulation, as in the source's
// self-test waveforms; a synthesis run that keeps only the ports therefore
// drops the counter. In self-test mode operand A is the LFSR state and
// operand B the same state bit-reversed, so that the two operands differ;
// this pairing, the LFSR polynomial and seed, and the counter width are this
// design's choices.
//
// Timing: the multiply path a/b -> y and the check path -> correct are
// combinational. The LFSR and the counters update on the rising edge of clk;
// a pattern is applied for one whole cycle and its comparison is counted at
// the edge that ends the cycle.
module vedic_mult_64bit_using_BIST
  import vedic_bist_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter int unsigned CNT_W = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic           bist_on,
  input  logic           clk,
  output logic [2*N-1:0] y,
  output logic           correct
);

  logic [N-1:0]      pattern;
  logic [N-1:0]      pattern_rev;
  logic [N-1:0]      op_a;
  logic [N-1:0]      op_b;
  logic [2*N-1:0]    vedic_p;
  logic [2*N-1:0]    ref_p;
  logic [CNT_W-1:0]  correct_out;
  logic [CNT_W-1:0]  incorrect_out;
  logic [PERF_W-1:0] performance;

  bist_lfsr #(
    .W   (N),
    .TAPS(N'(lfsr_taps(N))),
    .SEED('1)
  ) u_lfsr (
    .clk(clk),
    .en (bist_on),
    .q  (pattern)
  );

  always_comb pattern_rev = {<<{pattern}};

  operand_mux #(.W(N)) u_mux_a (.bist_on(bist_on), .ext(a), .pattern(pattern),     .y(op_a));
  operand_mux #(.W(N)) u_mux_b (.bist_on(bist_on), .ext(b), .pattern(pattern_rev), .y(op_b));

  vedic_mult #(.N(N)) u_mult (.a(op_a), .b(op_b), .p(vedic_p));

  ref_mult #(.N(N)) u_ref (.a(op_a), .b(op_b), .p(ref_p));

  product_compare #(.W(2*N)) u_cmp (.x(vedic_p), .y(ref_p), .equal(correct));

  bist_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk          (clk),
    .en           (bist_on),
    .correct      (correct),
    .correct_out  (correct_out),
    .incorrect_out(incorrect_out),
    .performance  (performance)
  );

  assign y = vedic_p;

endmodule
