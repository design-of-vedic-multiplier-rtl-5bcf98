// product_compare -- equality check of the Vedic and reference products.
//
// equal is 1 exactly when both W-bit products agree in every bit; it drives
// the self-testing multiplier's 'correct' output. That an equality
// comparator produces 'correct' follows the design's structure.
//
// Interface: x[W-1:0], y[W-1:0] in; equal out. Purely combinational.
module product_compare #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic         equal
);

  always_comb equal = (x == y);

endmodule
