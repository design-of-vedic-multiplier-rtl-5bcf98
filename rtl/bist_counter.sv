// bist_counter -- tallies the self-test comparisons and reports a score.
//
// On every rising clock edge with en (bist_on) high, the comparison result of
// that cycle is counted: correct_out counts cycles with correct = 1 and
// incorrect_out those with correct = 0. performance is the whole percentage
// of correct comparisons, correct_out * 100 / (correct_out + incorrect_out),
// truncated, and 0 before anything is counted. With 99 correct and 1
// incorrect it reads 99; with 39 and 1 it reads 97.
//
// A session starts on the first enabled clock after en was low: both counts
// restart from that cycle's result. While en is low the counts hold, so the
// result of the last session can be read after the test. The three outputs
// and the percentage follow the source's self-test results; the session
// restart, the counter width and the power-up value of zero (declaration
// initialisers, there being no reset input) are this design's choices.
// The counters wrap after 2^CNT_W - 1 comparisons.
//
// Interface: clk, en, correct in; correct_out, incorrect_out [CNT_W-1:0] and
// performance [6:0] out. The counts are registers; performance is
// combinational from them.
module bist_counter
  import vedic_bist_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              en,
  input  logic              correct,
  output logic [CNT_W-1:0]  correct_out,
  output logic [CNT_W-1:0]  incorrect_out,
  output logic [PERF_W-1:0] performance
);

  localparam int unsigned PROD_W = CNT_W + PERF_W + 1;

  logic [CNT_W-1:0] n_ok  = '0;
  logic [CNT_W-1:0] n_bad = '0;
  logic             en_q  = 1'b0;
  logic [CNT_W:0]   total;
  logic [PROD_W-1:0] scaled;

  always_ff @(posedge clk) begin
    en_q <= en;
    if (en) begin
      if (!en_q) begin
        n_ok  <= CNT_W'(correct);
        n_bad <= CNT_W'(!correct);
      end else begin
        n_ok  <= n_ok  + CNT_W'(correct);
        n_bad <= n_bad + CNT_W'(!correct);
      end
    end
  end

  always_comb begin
    total  = {1'b0, n_ok} + {1'b0, n_bad};
    scaled = PROD_W'(n_ok) * PROD_W'(PERF_SCALE);
    if (total == '0) performance = '0;
    else             performance = PERF_W'(scaled / PROD_W'(total));
  end

  assign correct_out   = n_ok;
  assign incorrect_out = n_bad;

endmodule
