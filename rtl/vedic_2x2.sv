// vedic_2x2 -- 2x2-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method; the leaf cell of vedic_mult.
//
// With a = {AH, AL} and b = {BH, BL} the product is formed in three steps,
// each adding the carry of the step before instead of propagating it later:
//   step 1 (vertical):   AL*BL            -> R0L, carry C1
//   step 2 (crosswise):  AH*BL + BH*AL + C1 -> R1L, carry C2
//   step 3 (vertical):   AH*BH + C2        -> R2L, R2H
// p = {R2H, R2L, R1L, R0L}. The step order, the partial products and the
// carry chain follow the description of the method; the one-bit products are
// ANDs and the one-bit sums are written here as plain additions.
//
// Interface: a[1:0], b[1:0] in, p[3:0] out. Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic [1:0] step1;  // {C1, R0L}
  logic [1:0] step2;  // {C2, R1L}
  logic [1:0] step3;  // {R2H, R2L}

  always_comb begin
    step1 = 2'(a[0] & b[0]);
    step2 = 2'(a[1] & b[0]) + 2'(a[0] & b[1]) + 2'(step1[1]);
    step3 = 2'(a[1] & b[1]) + 2'(step2[1]);
    p     = {step3, step2[0], step1[0]};
  end

endmodule
