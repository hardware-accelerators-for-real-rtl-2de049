// udm_mul: W x W unsigned approximate multiplier built from 2x2
// under-designed blocks (udm_mul2).
//
// A 4x4 multiplier is formed from four 2x2 blocks: with A = {AH, AL} and
// X = {XH, XL}, P = AL*XL + (AH*XL + AL*XH) << 2 + AH*XH << 4, and wider
// multipliers repeat the same split on their halves. Because every level
// adds its partial products exactly, the whole tree is equal to one flat
// sum: cut both operands into 2-bit digits A_i and X_j, multiply every pair
// with a 2x2 block, and add the block outputs at weight 4^(i+j):
//   P = sum_{i,j} udm2(A_i, X_j) << 2*(i+j).
// This module builds that flat form, which gives the same result as the
// recursive construction. The only error source is the 2x2 block, whose
// 3 x 3 = 7. W must be even. Default W = 16, for a 16-bit ("short") operand.
// The 2x2 block and the partial-product construction follow the
// under-designed multiplier; the exact summation is this design's choice.
// Purely combinational.
module udm_mul #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   x,
  output logic [2*W-1:0] p
);

  localparam int unsigned D = W / 2;   // 2-bit digits per operand

  logic [2:0] pp [D][D];

  for (genvar i = 0; i < D; i++) begin : g_a
    for (genvar j = 0; j < D; j++) begin : g_x
      udm_mul2 u_blk (.a(a[2*i +: 2]), .b(x[2*j +: 2]), .p(pp[i][j]));
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++)
        p = p + ((2*W)'(pp[i][j]) << (2*(i+j)));
  end

endmodule
