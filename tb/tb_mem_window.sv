// tb_mem_window: shifts random columns into the 3x3 window and checks all
// nine outputs against the last three columns, the reset value, and that the
// window holds while shift_i is low.
module tb_mem_window;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       shift = 1'b0;
  logic [7:0] col [3];
  logic [7:0] win [3][3];

  mem_window dut (.clk, .rst_n, .shift_i(shift), .col_i(col), .win_o(win));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int hist [64][3];

  initial begin
    for (int r = 0; r < 3; r++) col[r] = '0;
    repeat (2) @(negedge clk);
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) check("reset", win[r][c], 0);
    rst_n = 1'b1;
    for (int t = 0; t < 64; t++) begin
      @(negedge clk);
      for (int r = 0; r < 3; r++) begin hist[t][r] = $urandom_range(255); col[r] = 8'(hist[t][r]); end
      shift = 1'b1;
      @(negedge clk);
      shift = 1'b0;
      if (t >= 2)
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            check($sformatf("win[%0d][%0d] t=%0d", r, c, t), win[r][c], hist[t-2+c][r]);
    end
    for (int r = 0; r < 3; r++) col[r] = 8'hFF;
    repeat (3) @(negedge clk);
    for (int r = 0; r < 3; r++) check("held", win[r][2], hist[63][r]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
