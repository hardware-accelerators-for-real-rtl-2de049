// tb_line_buffer: scans several rows of random pixels through a small line
// buffer and checks that each column read returns the pixels one and two
// rows above, and that nothing moves while shift_i is low.
module tb_line_buffer;
  localparam int W = 13, ROWS = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       shift = 1'b0;
  logic [3:0] col = '0;
  logic [7:0] pix = '0;
  logic [7:0] rows [2];

  line_buffer #(.MAX_W(16), .PIX_W(8), .KSIZE(3)) dut (
    .clk, .shift_i(shift), .col_i(col), .pix_i(pix), .rows_o(rows)
  );
  // the default size must elaborate too
  logic [7:0] rows_big [2];
  line_buffer u_default (.clk, .shift_i(1'b0), .col_i(10'd0), .pix_i(8'd0), .rows_o(rows_big));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int img [ROWS][W];

  initial begin
    for (int y = 0; y < ROWS; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(255);
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        col = 4'(x); pix = 8'(img[y][x]); shift = 1'b1;
        #1;
        if (y >= 2) check($sformatf("two rows up (%0d,%0d)", x, y), rows[0], img[y-2][x]);
        if (y >= 1) check($sformatf("one row up (%0d,%0d)", x, y), rows[1], img[y-1][x]);
      end
    @(negedge clk); shift = 1'b0; pix = 8'hAA; col = 4'd3;
    repeat (3) @(negedge clk);
    #1;
    check("held: one row up", rows[1], img[ROWS-1][3]);
    check("held: two rows up", rows[0], img[ROWS-2][3]);
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
