// tb_udm_mul: the 2x2 block against the modified Karnaugh map, entry by
// entry; an 8x8 multiplier exhaustively and the default 16x16 one on random
// operands against "exact product minus 2*4^(i+j) for every (3,3) digit
// pair"; and hand-worked cases.
module tb_udm_mul;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [1:0]  a2, b2;
  logic [2:0]  p2;
  logic [7:0]  a8, x8;
  logic [15:0] p8;
  logic [15:0] a16, x16;
  logic [31:0] p16;

  udm_mul2 u_2 (.a(a2), .b(b2), .p(p2));
  udm_mul #(.W(8)) u_8 (.a(a8), .x(x8), .p(p8));
  udm_mul u_16 (.a(a16), .x(x16), .p(p16));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Karnaugh map rows A=00,01,11,10 and columns B=00,01,11,10
  int kmap [4][4] = '{'{0,0,0,0}, '{0,1,3,2}, '{0,3,7,6}, '{0,2,6,4}};
  int gray [4] = '{0, 1, 3, 2};

  initial begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        a2 = 2'(gray[r]); b2 = 2'(gray[c]); #1;
        check($sformatf("2x2 %0d*%0d", a2, b2), p2, kmap[r][c]);
      end
    for (int a = 0; a < 256; a++)
      for (int x = 0; x < 256; x++) begin
        a8 = 8'(a); x8 = 8'(x); #1;
        check($sformatf("8x8 %0d*%0d", a, x), p8, udm_ref(a, x, 8));
      end
    a8 = 8'd255; x8 = 8'd1; #1;  check("255*1 exact", p8, 255);
    a8 = 8'd3;   x8 = 8'd3; #1;  check("3*3 = 7", p8, 7);
    a8 = 8'd15;  x8 = 8'd15; #1; check("15*15 = 225-2-8-8-32", p8, 175);
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); x16 = 16'($urandom);
      if (i % 3 == 0) a16 = 16'($urandom_range(255));
      #1;
      check($sformatf("16x16 %0d*%0d", a16, x16), p16, udm_ref(a16, x16, 16));
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
