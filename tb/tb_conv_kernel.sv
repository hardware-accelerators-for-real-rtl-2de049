// tb_conv_kernel: the computation kernel in its three arithmetic variants,
// with the kernels of the edge-detection examples (identity, two Laplacian
// forms and the diagonal kernel) and random ones, on random and hand-made
// windows. Checks saturation at both ends and that the approximate variants
// really differ from the exact one on some inputs.
module tb_conv_kernel;
  import accel_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]         win  [3][3];
  logic signed [15:0] coef [3][3];
  logic signed [15:0] sum [3];
  logic [7:0]         pix [3];

  conv_kernel                           u_exact (.win_i(win), .coef_i(coef), .sum_o(sum[0]), .pix_o(pix[0]));
  conv_kernel #(.ARITH(ARITH_APPROX_ADD)) u_aadd (.win_i(win), .coef_i(coef), .sum_o(sum[1]), .pix_o(pix[1]));
  conv_kernel #(.ARITH(ARITH_APPROX_MUL)) u_amul (.win_i(win), .coef_i(coef), .sum_o(sum[2]), .pix_o(pix[2]));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int k_id  [3][3] = '{'{0,0,0}, '{0,1,0}, '{0,0,0}};
  int k_e1  [3][3] = '{'{1,0,-1}, '{0,0,0}, '{-1,0,1}};
  int k_e2  [3][3] = '{'{0,-1,0}, '{-1,4,-1}, '{0,-1,0}};
  int k_e3  [3][3] = '{'{-1,-1,-1}, '{-1,8,-1}, '{-1,-1,-1}};
  int w [3][3], k [3][3];
  int diff_add = 0, diff_mul = 0, sat_lo = 0, sat_hi = 0;

  task automatic apply();
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
      win[r][c] = 8'(w[r][c]); coef[r][c] = 16'(k[r][c]);
    end
    #1;
    for (int a = 0; a < 3; a++)
      check($sformatf("arith %0d", a), pix[a], conv_pix_ref(w, k, a));
    if (pix[1] != pix[0]) diff_add++;
    if (pix[2] != pix[0]) diff_mul++;
    if (pix[0] == 0) sat_lo++;
    if (pix[0] == 255) sat_hi++;
  endtask

  initial begin
    // hand-worked: flat window under the Laplacian gives 0, a bright centre saturates
    w = '{'{10,10,10}, '{10,10,10}, '{10,10,10}}; k = k_e3; apply();
    check("flat window, edge kernel", pix[0], 0);
    w = '{'{0,0,0}, '{0,200,0}, '{0,0,0}}; k = k_e2; apply();
    check("bright centre saturates high", pix[0], 255);
    check("unsaturated sum", sum[0], 800);
    w = '{'{200,200,200}, '{200,0,200}, '{200,200,200}}; k = k_e3; apply();
    check("dark centre saturates low", pix[0], 0);
    check("negative sum", sum[0], -1600);
    w = '{'{1,2,3}, '{4,255,6}, '{7,8,9}}; k = k_id; apply();
    check("identity", pix[0], 255);
    for (int i = 0; i < 20000; i++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) w[r][c] = $urandom_range(255);
      case (i % 5)
        0: k = k_id;
        1: k = k_e1;
        2: k = k_e2;
        3: k = k_e3;
        default: for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) k[r][c] = $urandom_range(16) - 8;
      endcase
      apply();
    end
    checks++;
    if (diff_add == 0 || diff_mul == 0 || sat_lo == 0 || sat_hi == 0) begin
      failures++;
      $display("FAIL coverage add=%0d mul=%0d lo=%0d hi=%0d", diff_add, diff_mul, sat_lo, sat_hi);
    end
    $display("approximate adder differs on %0d, multiplier on %0d windows", diff_add, diff_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
