// tb_gear_add: GeAr(16,4,4) against a window-by-window integer model, plus
// hand-worked cases: additions without long carry chains are exact, and a
// carry that must travel more than P+1 bits is lost.
module tb_gear_add;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        cout;
  logic [11:0] a2, b2, s2;
  logic        c2;

  gear_add dut (.a, .b, .s, .cout);
  gear_add #(.N(12), .R(2), .P(2)) u_small (.a(a2), .b(b2), .s(s2), .cout(c2));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int exact = 0;

  initial begin
    a = 16'h1234; b = 16'h2341; #1; check("no carries: exact", s, 16'h3575);
    a = 16'h00FF; b = 16'h0001; #1; check("carry from bit 7 to 8 lost", s, 16'h0000);
    a = 16'h000F; b = 16'h0001; #1; check("carry within first window", s, 16'h0010);
    a = 16'h0080; b = 16'h0080; #1; check("carry predicted by window 1", s, 16'h0100);
    a = 16'h00F8; b = 16'h0008; #1; check("carry from bit 3 unseen by window 1", s, 16'h0000);
    a = 16'hFFFF; b = 16'h0001; #1; check("-1 + 1 loses the long chain", s, 16'hFF00);
    a = 16'hF000; b = 16'h1000; #1; check("carry out of the top", cout, 1);
    for (int i = 0; i < 50000; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      #1;
      check($sformatf("%h+%h", a, b), s, gear_ref(a, b, 16, 4, 4));
      if (s == a + b) exact++;
      a2 = 12'($urandom); b2 = 12'($urandom);
      #1;
      check($sformatf("small %h+%h", a2, b2), s2, gear_ref(a2, b2, 12, 2, 2));
    end
    // most random additions are exact, not all
    checks++;
    if (exact < 40000 || exact == 50000) begin failures++; $display("FAIL exact count %0d", exact); end
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
