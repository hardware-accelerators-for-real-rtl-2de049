// tb_conv_engine: whole images through the streaming convolution engine
// (MAX_W reduced to 64 for speed): several sizes, including one and two
// pixel wide or tall images, the edge-detection and identity kernels,
// random source gaps and sink back-pressure. Every output pixel is compared
// with a direct 3x3 sum with a zero border; TLAST, done and the
// (W+1)(H+1)-clock scan time without stalls are checked.
module tb_conv_engine;
  import accel_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               start = 1'b0, enable = 1'b0;
  logic [15:0]        width = '0, height = '0;
  logic signed [15:0] coef [3][3];
  logic [31:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic        m_tvalid, m_tready = 1'b0, m_tlast, done;

  conv_engine #(.MAX_W(64)) dut (
    .clk, .rst_n, .start_i(start), .enable_i(enable), .width_i(width), .height_i(height),
    .coef_i(coef),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast),
    .done_o(done)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int img [];
  int k [3][3];
  int dones;
  always @(negedge clk) if (done) dones++;

  task automatic run_image(int w, int h, int pv, int pr, int seed, output int cycles);
    int n = w * h, n_in = 0, n_out = 0, t0;
    img = new[n];
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y*w + x] = img_pix(x, y, w, h, seed);
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) coef[r][c] = 16'(k[r][c]);
    width = 16'(w); height = 16'(h);
    @(negedge clk); start = 1'b1; enable = 1'b1;
    @(negedge clk); start = 1'b0;
    t0 = $time;
    fork
      begin
        while (n_in < n) begin
          s_tvalid = ($urandom_range(99) < pv);
          s_tdata  = {24'($urandom), 8'(img[n_in])};
          s_tlast  = (n_in == n-1);
          #1;
          if (s_tvalid && s_tready) n_in++;
          @(negedge clk);
        end
        s_tvalid = 1'b0;
      end
      begin
        while (n_out < n) begin
          m_tready = ($urandom_range(99) < pr);
          #1;
          if (m_tvalid && m_tready) begin
            check($sformatf("%0dx%0d pixel (%0d,%0d)", w, h, n_out % w, n_out / w), int'(m_tdata),
                  conv_img_ref(img, w, h, n_out % w, n_out / w, k, 0));
            check("tlast", int'(m_tlast), int'(n_out == n-1));
            n_out++;
          end
          @(negedge clk);
        end
        m_tready = 1'b0;
      end
    join
    cycles = ($time - t0) / 10;
    enable = 1'b0;
  endtask

  int cyc;

  initial begin
    dones = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    k = '{'{-1,-1,-1}, '{-1,8,-1}, '{-1,-1,-1}};
    run_image(20, 12, 100, 100, 1, cyc);
    check("scan clocks (W+1)(H+1) + output register", cyc, 21 * 13 + 1);
    check("done pulses", dones, 1);
    run_image(64, 9, 70, 60, 2, cyc);
    k = '{'{0,-1,0}, '{-1,4,-1}, '{0,-1,0}};
    run_image(17, 23, 50, 80, 3, cyc);
    k = '{'{0,0,0}, '{0,1,0}, '{0,0,0}};
    run_image(9, 7, 90, 40, 4, cyc);
    run_image(1, 5, 80, 80, 5, cyc);
    run_image(5, 1, 80, 80, 6, cyc);
    run_image(2, 2, 80, 80, 7, cyc);
    k = '{'{1,0,-1}, '{0,0,0}, '{-1,0,1}};
    run_image(33, 15, 100, 30, 8, cyc);
    check("done pulses", dones, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
