// vedic_combine -- one level of the Vedic multiplier: joins four S x S
// products into the 2S x 2S product of the doubled operands.
//
// With a = {aH, aL} and b = {bH, bL} (S bits per half) the inputs are the
// vertical products q0 = aL*bL and q3 = aH*bH and the crosswise products
// q1 = aH*bL and q2 = aL*bH -- the Urdhva Tiryakbhyam pattern of the 2x2 cell
// applied to halves instead of bits. The result is
//   p = q0 + ((q1 + q2) << S) + (q3 << 2S)
// where the low S bits of q0 pass straight through, one (2S+1)-bit adder
// forms the crosswise sum with its carry, and one 3S-bit adder adds it to
// {q3, upper half of q0}. The two-adder arrangement is this design's choice.
//
// Interface: q0..q3 [2S-1:0] in, p [4S-1:0] out. Purely combinational.
module vedic_combine #(
  parameter int unsigned S = 32
) (
  input  logic [2*S-1:0] q0,
  input  logic [2*S-1:0] q1,
  input  logic [2*S-1:0] q2,
  input  logic [2*S-1:0] q3,
  output logic [4*S-1:0] p
);

  logic [2*S:0]   cross_sum;  // q1 + q2 with its carry
  logic [3*S-1:0] upper;      // p[4S-1:S]

  always_comb begin
    cross_sum = {1'b0, q1} + {1'b0, q2};
    upper     = {q3, q0[2*S-1:S]} + (3*S)'(cross_sum);
    p         = {upper, q0[S-1:0]};
  end

endmodule
