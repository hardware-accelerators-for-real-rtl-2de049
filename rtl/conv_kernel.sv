// conv_kernel: the computation kernel of the 3x3 image convolution.
//
// For one window position it forms
//   g = sum_{r,c} w[r][c] * f[r][c]
// over the nine pixels f (8-bit, unsigned) of the window and the nine kernel
// weights w (16-bit, signed), then saturates g to the pixel range: a
// negative sum gives 0 and a sum above 255 gives 255. Products and the
// running sum are 16-bit two's complement ("short"), matching the 16-bit
// approximate adder. The sum is accumulated in row-major order, one product
// at a time, as a loop over the kernel would do.
// ARITH selects the arithmetic (one accelerator is built per choice):
//   ARITH_EXACT      exact products and sums;
//   ARITH_APPROX_MUL products from the under-designed multiplier (udm_mul):
//                    the magnitude of the weight is multiplied by the pixel
//                    and the sign is applied afterwards, so negative weights
//                    are handled;
//   ARITH_APPROX_ADD sums from the GeAr(16,4,4) adder (gear_add).
// Purely combinational; sum_o gives the unsaturated 16-bit sum.
// The saturation rule, the 16-bit kernel, the adder configuration and the
// multiplier follow the accelerator's description; the 16-bit product and
// sum width, the sign-magnitude wrapper around the multiplier and the
// accumulation order are this design's choices.
module conv_kernel
  import accel_pkg::*;
#(
  parameter arith_e ARITH = ARITH_EXACT
) (
  input  logic [PIX_W-1:0]         win_i  [KSIZE][KSIZE],
  input  logic signed [COEF_W-1:0] coef_i [KSIZE][KSIZE],
  output logic signed [SUM_W-1:0]  sum_o,
  output logic [PIX_W-1:0]         pix_o
);

  localparam int unsigned NT = KSIZE * KSIZE;

  logic signed [SUM_W-1:0] prod [NT];
  logic signed [SUM_W-1:0] part [NT+1];   // part[i] = sum of the first i products

  // products
  for (genvar r = 0; r < KSIZE; r++) begin : g_r
    for (genvar c = 0; c < KSIZE; c++) begin : g_c
      localparam int unsigned I = r * KSIZE + c;
      if (ARITH == ARITH_APPROX_MUL) begin : g_udm
        logic              neg;
        logic [COEF_W-1:0] mag;
        logic [2*COEF_W-1:0] p;
        assign neg = coef_i[r][c][COEF_W-1];
        assign mag = neg ? COEF_W'(-coef_i[r][c]) : COEF_W'(coef_i[r][c]);
        udm_mul #(.W(COEF_W)) u_mul (.a(COEF_W'(win_i[r][c])), .x(mag), .p(p));
        assign prod[I] = neg ? -SUM_W'(p) : SUM_W'(p);
      end else begin : g_exact
        assign prod[I] = SUM_W'(coef_i[r][c] * $signed({1'b0, win_i[r][c]}));
      end
    end
  end

  // accumulation chain
  assign part[0] = '0;
  for (genvar i = 0; i < NT; i++) begin : g_acc
    if (ARITH == ARITH_APPROX_ADD) begin : g_gear
      logic [SUM_W-1:0] s;
      logic             unused_cout;
      gear_add #(.N(SUM_W), .R(4), .P(4)) u_add (
        .a(part[i]), .b(prod[i]), .s(s), .cout(unused_cout)
      );
      assign part[i+1] = signed'(s);
    end else begin : g_exact
      assign part[i+1] = part[i] + prod[i];
    end
  end

  assign sum_o = part[NT];
  assign pix_o = (sum_o < 0)   ? '0 :
                 (sum_o > 255) ? PIX_W'(255) : PIX_W'(sum_o);

endmodule
