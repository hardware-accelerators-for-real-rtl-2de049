// tb_fp_mul: half- and single-precision multipliers against a reference that
// multiplies in double precision and rounds by integer arithmetic. Covers
// hand-worked values, random normals, subnormals, overflow, underflow and
// the special values.
module tb_fp_mul;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] ha, hb, hy;
  logic [31:0] sa, sb, sy;

  fp_mul #(.EXP_W(5), .MAN_W(10)) u_half   (.a(ha), .b(hb), .y(hy));
  fp_mul #(.EXP_W(8), .MAN_W(23)) u_single (.a(sa), .b(sb), .y(sy));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic half(logic [15:0] a, logic [15:0] b, logic [15:0] exp, string what);
    ha = a; hb = b; #1;
    check(what, hy, exp);
  endtask

  // random binary16 operand; class 0 normal, 1 subnormal, 2 special, 3 any
  function automatic logic [15:0] rnd_half(int cls);
    logic [15:0] v = 16'($urandom);
    case (cls)
      0: v[14:10] = 5'($urandom_range(30, 1));
      1: v[14:10] = 5'd0;
      2: v[14:10] = 5'h1F;
      default: ;
    endcase
    if (cls == 2 && $urandom_range(1)) v[9:0] = '0;
    return v;
  endfunction

  function automatic logic [31:0] rnd_single(int cls);
    logic [31:0] v = $urandom;
    case (cls)
      0: v[30:23] = 8'($urandom_range(254, 1));
      1: v[30:23] = 8'd0;
      2: v[30:23] = 8'hFF;
      default: ;
    endcase
    if (cls == 2 && $urandom_range(1)) v[22:0] = '0;
    return v;
  endfunction

  initial begin
    // hand-worked binary16 cases
    half(16'h3C00, 16'h3C00, 16'h3C00, "1*1");
    half(16'h4000, 16'h4200, 16'h4600, "2*3=6");
    half(16'h3C01, 16'h3C00, 16'h3C01, "(1+1/1024)*1");
    half(16'h7BFF, 16'h4000, 16'h7C00, "65504*2 overflows to inf");
    half(16'h7BFF, 16'h3C00, 16'h7BFF, "65504*1");
    half(16'h0001, 16'h3C00, 16'h0001, "smallest subnormal *1");
    half(16'h0001, 16'h3800, 16'h0000, "2^-24 * 0.5 rounds to even 0");
    half(16'h0003, 16'h3800, 16'h0002, "3*2^-24 * 0.5 rounds to even 2");
    half(16'h0400, 16'h3800, 16'h0200, "min normal * 0.5 = subnormal");
    half(16'hC000, 16'h4000, 16'hC400, "-2*2=-4");
    half(16'h7C00, 16'h0000, 16'h7E00, "inf*0 = NaN");
    half(16'h7C00, 16'hBC00, 16'hFC00, "inf*-1 = -inf");
    half(16'h8000, 16'h3C00, 16'h8000, "-0*1 = -0");
    half(16'h3555, 16'h4200, 16'h3C00, "0.33325*3 rounds to 1");
    checks++;
    if (fp_to_real(64'h0001, 5, 10) != pow2(-24)) begin failures++; $display("FAIL reference 2^-24"); end

    for (int i = 0; i < 40000; i++) begin
      ha = rnd_half($urandom_range(3) == 0 ? $urandom_range(3) : 0);
      hb = rnd_half($urandom_range(3) == 0 ? $urandom_range(3) : 0);
      #1;
      check($sformatf("half %h*%h", ha, hb), hy, fp_mul_ref(ha, hb, 5, 10));
    end
    // products landing near the bottom of the range: exponents summing to ~bias
    for (int i = 0; i < 10000; i++) begin
      ha = rnd_half(0); hb = rnd_half(0);
      ha[14:10] = 5'($urandom_range(12, 1)); hb[14:10] = 5'($urandom_range(6, 1));
      #1;
      check($sformatf("half low %h*%h", ha, hb), hy, fp_mul_ref(ha, hb, 5, 10));
    end
    for (int i = 0; i < 40000; i++) begin
      sa = rnd_single($urandom_range(3) == 0 ? $urandom_range(3) : 0);
      sb = rnd_single($urandom_range(3) == 0 ? $urandom_range(3) : 0);
      if (i % 4 == 1) begin sa[30:23] = 8'($urandom_range(60, 1)); sb[30:23] = 8'($urandom_range(80, 1)); end
      #1;
      check($sformatf("single %h*%h", sa, sb), sy, fp_mul_ref(sa, sb, 8, 23));
    end
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
