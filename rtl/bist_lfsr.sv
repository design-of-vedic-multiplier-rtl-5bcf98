// bist_lfsr -- pseudo-random pattern generator for the multiplier self-test.
//
// A W-bit Fibonacci LFSR shifting towards the MSB: the new LSB is the XOR of
// the state bits selected by TAPS. While en is low the register holds SEED,
// so every self-test session starts from the same pattern and a run is
// repeatable; while en is high it steps once per clock. q is the register
// itself, so the pattern of a cycle is stable for the whole cycle and the
// first pattern of a session is SEED.
//
// That the test patterns come from an LFSR follows the source description;
// its width, polynomial, seed and the hold-at-seed behaviour are this
// design's choices. The register also powers up at SEED (declaration
// initialiser), as there is no reset input on the self-testing multiplier.
// SEED must not be zero (the all-zero state locks an XOR LFSR).
//
// Interface: clk, en in; q[W-1:0] out. Timing: q changes on the rising edge.
module bist_lfsr #(
  parameter int unsigned W    = 64,
  parameter logic [W-1:0] TAPS = W'(64'hD800_0000_0000_0000),
  parameter logic [W-1:0] SEED = '1
) (
  input  logic         clk,
  input  logic         en,
  output logic [W-1:0] q
);

  logic [W-1:0] state = SEED;
  logic         feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!en) state <= SEED;
    else     state <= {state[W-2:0], feedback};
  end

  assign q = state;

endmodule
