// ref_mult -- reference multiplier the Vedic product is checked against.
//
// An unsigned N x N product written with the language's multiply operator,
// leaving its structure to synthesis, so that it shares no structure with
// the Vedic array it checks. The design carries a second, plain multiplier
// beside the Vedic one for this comparison; how it is built is this design's
// choice.
//
// Interface: a[N-1:0], b[N-1:0] in; p[2N-1:0] out. Purely combinational.
module ref_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  always_comb p = (2*N)'(a) * (2*N)'(b);

endmodule
