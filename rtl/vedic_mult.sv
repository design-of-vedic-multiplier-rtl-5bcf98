// vedic_mult -- N x N unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// The operands are split into N/2 two-bit digits. Level 0 is an array of
// (N/2)^2 vedic_2x2 cells, one for every pair of an a-digit and a b-digit.
// Each further level doubles the operand width: block (i, j) of level l
// multiplies the i-th slice of a by the j-th slice of b, both S = 2^(l+1)
// bits wide, and is formed by vedic_combine from the four level l-1 products
// of the half slices -- vertical (low x low, high x high) and crosswise
// (high x low, low x high), as the 2x2 cell does with single bits. The last
// level has one block, the full product. At the default N = 64 there are
// 1024 cells and five combining levels (256 + 64 + 16 + 4 + 1 combiners).
//
// Building the wide multiplier out of the 2x2 method follows the source
// description; the four-way split per level and the adders inside
// vedic_combine are this design's choice, as the composition is not given.
//
// Interface: a[N-1:0], b[N-1:0] in, p[2N-1:0] out. Purely combinational.
// N must be a power of two and at least 2.
module vedic_mult #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned LEVELS = $clog2(N);  // level 0 .. LEVELS-1

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_width
    $error("vedic_mult: N = %0d must be a power of two >= 2", N);
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned S = 2 << l;   // operand slice width
    localparam int unsigned K = N / S;    // slices per operand
    // prod[i*K + j] = a[i*S +: S] * b[j*S +: S]
    logic [2*S-1:0] prod [K*K];

    for (genvar i = 0; i < K; i++) begin : g_row
      for (genvar j = 0; j < K; j++) begin : g_col
        if (l == 0) begin : g_cell
          vedic_2x2 u_cell (.a(a[i*2 +: 2]), .b(b[j*2 +: 2]), .p(prod[i*K + j]));
        end else begin : g_join
          vedic_combine #(.S(S / 2)) u_join (
            .q0(g_lvl[l-1].prod[(2*i)     * (2*K) + (2*j)]),
            .q1(g_lvl[l-1].prod[(2*i + 1) * (2*K) + (2*j)]),
            .q2(g_lvl[l-1].prod[(2*i)     * (2*K) + (2*j + 1)]),
            .q3(g_lvl[l-1].prod[(2*i + 1) * (2*K) + (2*j + 1)]),
            .p (prod[i*K + j])
          );
        end
      end
    end
  end

  assign p = g_lvl[LEVELS-1].prod[0];

endmodule
