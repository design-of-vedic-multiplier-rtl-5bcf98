// operand_mux -- 2:1 operand selector in front of the multipliers.
//
// In self-test mode (bist_on = 1) the multipliers take the generated test
// pattern; otherwise they take the operand from the input port. The two
// multiplexers in front of the multiplier and the bist_on select come from
// the design's structure; the select polarity is this design's choice.
//
// Interface: bist_on, ext[W-1:0], pattern[W-1:0] in; y[W-1:0] out.
// Purely combinational.
module operand_mux #(
  parameter int unsigned W = 64
) (
  input  logic         bist_on,
  input  logic [W-1:0] ext,
  input  logic [W-1:0] pattern,
  output logic [W-1:0] y
);

  always_comb y = bist_on ? pattern : ext;

endmodule
