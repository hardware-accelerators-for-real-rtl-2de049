// tb_accel_top: end-to-end run of the whole accelerator system at its
// default parameters. Acting as processor and DMA, it configures and starts
// all six accelerators and streams their data at the same time:
//   FIR              400 samples, 11 random taps, random stalls
//   half multiply    1000 samples times a constant, random stalls
//   single multiply  1000 samples times a constant, random stalls
//   exact conv       a 640x360 image, edge kernel, no stalls (the larger of
//                    the two evaluated resolutions; time checked)
//   GeAr conv        a 320x240 image, edge kernel, random stalls
//   UDM conv         a 320x240 image, sharpening kernel, random stalls
// Every output word is checked against a reference model. It also counts how
// often each mechanism of the design happened and fails if one never did:
// source gaps, sink back-pressure, end-of-run interrupts, pixel saturation
// at 0 and at 255, zero borders, results of each approximate core that
// differ from exact ones, subnormal and overflowing floating-point results.
// It also prints the precision of each approximate core against the exact
// result, 1 - mean(((exact - approx)/255)^2).
module tb_accel_top;
  import accel_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_req_t axil_req [N_AXIL];
  axil_rsp_t axil_rsp [N_AXIL];
  axis_t     s_axis [N_ACC];
  logic      s_axis_tready [N_ACC];
  axis_t     m_axis [N_ACC];
  logic      m_axis_tready [N_ACC];
  logic      interrupt [N_ACC];

  accel_top dut (.clk, .rst_n, .axil_req, .axil_rsp, .s_axis, .s_axis_tready,
                 .m_axis, .m_axis_tready, .interrupt);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- AXI4-Lite master on bus i ----------------
  task automatic axil_write(int i, logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    axil_req[i].awaddr = a; axil_req[i].wdata = d; axil_req[i].wstrb = 4'hF;
    axil_req[i].awvalid = 1'b1; axil_req[i].wvalid = 1'b1; axil_req[i].bready = 1'b1;
    forever begin #1; if (axil_rsp[i].awready && axil_rsp[i].wready) break; @(negedge clk); end
    @(negedge clk);
    axil_req[i].awvalid = 1'b0; axil_req[i].wvalid = 1'b0;
    forever begin #1; if (axil_rsp[i].bvalid) break; @(negedge clk); end
    @(negedge clk);
    axil_req[i].bready = 1'b0;
  endtask

  task automatic axil_read(int i, logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    axil_req[i].araddr = a; axil_req[i].arvalid = 1'b1; axil_req[i].rready = 1'b1;
    forever begin #1; if (axil_rsp[i].arready) break; @(negedge clk); end
    @(negedge clk);
    axil_req[i].arvalid = 1'b0;
    forever begin #1; if (axil_rsp[i].rvalid) break; @(negedge clk); end
    d = axil_rsp[i].rdata;
    @(negedge clk);
    axil_req[i].rready = 1'b0;
  endtask

  // ---------------- stimulus and expected results ----------------
  int unsigned stim [N_ACC][$];
  int unsigned expv [N_ACC][$];
  int          pv [N_ACC], pr [N_ACC];
  int          t_start [N_ACC], t_end [N_ACC];

  // mechanism counters
  int n_gap, n_backpressure, n_irq, n_sat_lo, n_sat_hi, n_border, n_add_diff, n_mul_diff;
  // precision of an approximate core against the exact one:
  // 1 - mean(((exact - approx) / 255)^2) over the image
  real sqerr [3];
  int  npix [3];
  int n_subnormal, n_overflow;

  task automatic source(int i);
    int n = stim[i].size(), k = 0;
    while (k < n) begin
      s_axis[i].tvalid = ($urandom_range(99) < pv[i]);
      s_axis[i].tdata  = stim[i][k];
      s_axis[i].tlast  = (k == n-1);
      if (!s_axis[i].tvalid) n_gap++;
      #1;
      if (s_axis[i].tvalid && s_axis_tready[i]) k++;
      @(negedge clk);
    end
    s_axis[i].tvalid = 1'b0;
  endtask

  task automatic sink(int i);
    int n = expv[i].size(), k = 0;
    while (k < n) begin
      m_axis_tready[i] = ($urandom_range(99) < pr[i]);
      #1;
      if (m_axis[i].tvalid && !m_axis_tready[i]) n_backpressure++;
      if (m_axis[i].tvalid && m_axis_tready[i]) begin
        check($sformatf("accelerator %0d word %0d", i, k), m_axis[i].tdata, expv[i][k]);
        check($sformatf("accelerator %0d tlast", i), m_axis[i].tlast, k == n-1);
        k++;
      end
      @(negedge clk);
    end
    m_axis_tready[i] = 1'b0;
    t_end[i] = $time;
  endtask

  // ---------------- per-accelerator setup ----------------
  int conv_w [N_ACC], conv_h [N_ACC];

  task automatic setup_fir();
    int coef [11];
    int x [400];
    for (int k = 0; k < 11; k++) begin
      coef[k] = $urandom_range(100) - 50;
      axil_write(2*ACC_FIR+1, 8'(4*k), 32'(coef[k]));
    end
    for (int n = 0; n < 400; n++) begin
      int acc = 0;
      x[n] = $urandom_range(60000) - 30000;
      for (int k = 0; k < 11; k++) if (n - k >= 0) acc = acc + coef[k] * x[n-k];
      stim[ACC_FIR].push_back(x[n]);
      expv[ACC_FIR].push_back(acc);
    end
    pv[ACC_FIR] = 70; pr[ACC_FIR] = 70;
  endtask

  task automatic setup_fp(int i, int E, int M, longint unsigned b);
    axil_write(2*i+1, 8'h00, 32'(b));
    for (int n = 0; n < 1000; n++) begin
      longint unsigned a = longint'($urandom) & ((64'd1 << (1+E+M)) - 1), y;
      // exponents spread so that some products underflow and some overflow
      a = (a & ~(((64'd1 << E) - 1) << M)) | (longint'($urandom_range((1 << E) - 2)) << M);
      y = fp_mul_ref(a, b, E, M);
      if (((y >> M) & ((64'd1 << E) - 1)) == 0 && (y & ((64'd1 << M) - 1)) != 0) n_subnormal++;
      if (((y >> M) & ((64'd1 << E) - 1)) == (64'd1 << E) - 1) n_overflow++;
      stim[i].push_back(32'(a));
      expv[i].push_back(32'(y));
    end
    pv[i] = 80; pr[i] = 60;
  endtask

  task automatic setup_conv(int i, int w, int h, int k[3][3], int arith, int seed);
    int img [];
    img = new[w*h];
    for (int j = 0; j < 9; j++) axil_write(2*i+1, 8'(4*j), 32'(k[j/3][j%3]));
    axil_write(2*i+1, 8'(4*CONV_REG_W), 32'(w));
    axil_write(2*i+1, 8'(4*CONV_REG_H), 32'(h));
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      img[y*w + x] = img_pix(x, y, w, h, seed);
      stim[i].push_back(img[y*w + x]);
    end
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) begin
      int g = conv_img_ref(img, w, h, x, y, k, arith);
      int ge = conv_img_ref(img, w, h, x, y, k, 0);
      sqerr[arith] += ((g - ge) / 255.0) ** 2;
      npix[arith]++;
      if (x == 0 || y == 0 || x == w-1 || y == h-1) n_border++;
      else begin
        if (g == 0)   n_sat_lo++;
        if (g == 255) n_sat_hi++;
        if (g != ge) begin
          if (arith == 1) n_add_diff++;
          if (arith == 2) n_mul_diff++;
        end
      end
      expv[i].push_back(g);
    end
    conv_w[i] = w; conv_h[i] = h;
  endtask

  int k_edge [3][3] = '{'{-1,-1,-1}, '{-1,8,-1}, '{-1,-1,-1}};
  // a sharpening kernel whose centre weight 7 has the 2-bit digit 3, the
  // only digit for which the under-designed multiplier errs
  int k_sharp [3][3] = '{'{0,-1,0}, '{-1,7,-1}, '{0,-1,0}};
  logic [31:0] d;
  int irq_seen [N_ACC];

  always @(negedge clk)
    for (int i = 0; i < N_ACC; i++) if (interrupt[i] && irq_seen[i] == 0) begin
      irq_seen[i] = 1;
      n_irq++;
    end

  initial begin
    for (int i = 0; i < N_AXIL; i++) axil_req[i] = '0;
    for (int i = 0; i < N_ACC; i++) begin
      s_axis[i] = '0; m_axis_tready[i] = 1'b0; irq_seen[i] = 0;
    end
    {n_gap, n_backpressure, n_irq, n_sat_lo, n_sat_hi, n_border, n_add_diff, n_mul_diff, n_subnormal, n_overflow} = '0;
    sqerr = '{0.0, 0.0, 0.0};
    npix = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    setup_fir();
    setup_fp(ACC_HALF, 5, 10, 64'h3E00);             // x 1.5
    setup_fp(ACC_SINGLE, 8, 23, 64'h3FC00000);       // x 1.5
    setup_conv(ACC_CONV, 640, 360, k_edge, 0, 21);
    setup_conv(ACC_CONV_AADD, 320, 240, k_edge, 1, 22);
    setup_conv(ACC_CONV_AMUL, 320, 240, k_sharp, 2, 23);
    pv[ACC_CONV] = 100;      pr[ACC_CONV] = 100;
    pv[ACC_CONV_AADD] = 85;  pr[ACC_CONV_AADD] = 85;
    pv[ACC_CONV_AMUL] = 85;  pr[ACC_CONV_AMUL] = 85;

    for (int i = 0; i < N_ACC; i++) begin
      axil_write(2*i, REG_GIE, 1);
      axil_write(2*i, REG_IER, 1);
    end
    // start all six, then act as the DMA on all streams at once
    for (int i = N_ACC-1; i >= 0; i--) begin
      axil_write(2*i, REG_CTRL, 1);
    end
    for (int i = 0; i < N_ACC; i++) t_start[i] = $time;
    fork
      source(0); sink(0); source(1); sink(1); source(2); sink(2);
      source(3); sink(3); source(4); sink(4); source(5); sink(5);
    join
    @(negedge clk);
    for (int i = 0; i < N_ACC; i++) begin
      check($sformatf("interrupt %0d", i), interrupt[i], 1);
      axil_read(2*i, REG_CTRL, d);
      check($sformatf("done and idle %0d", i), d, 6);
    end
    // the exact core ran unstalled: one pixel per clock over the padded scan
    checks++;
    if ((t_end[ACC_CONV] - t_start[ACC_CONV]) / 10 > 641 * 361 + 4) begin
      failures++;
      $display("FAIL 640x360 took %0d clocks", (t_end[ACC_CONV] - t_start[ACC_CONV]) / 10);
    end
    $display("640x360 exact convolution: %0d clocks", (t_end[ACC_CONV] - t_start[ACC_CONV]) / 10);
    $display("precision: GeAr core %0.4f, UDM core %0.4f",
             1.0 - sqerr[1] / npix[1], 1.0 - sqerr[2] / npix[2]);
    $display("mechanisms: gaps=%0d backpressure=%0d interrupts=%0d sat0=%0d sat255=%0d border=%0d add_diff=%0d mul_diff=%0d subnormal=%0d overflow=%0d",
             n_gap, n_backpressure, n_irq, n_sat_lo, n_sat_hi, n_border, n_add_diff, n_mul_diff, n_subnormal, n_overflow);
    if (n_gap == 0)          begin failures++; $display("FAIL no source gap"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    if (n_irq != N_ACC)      begin failures++; $display("FAIL interrupts %0d", n_irq); end
    if (n_sat_lo == 0)       begin failures++; $display("FAIL no saturation at 0"); end
    if (n_sat_hi == 0)       begin failures++; $display("FAIL no saturation at 255"); end
    if (n_border == 0)       begin failures++; $display("FAIL no border"); end
    if (n_add_diff == 0)     begin failures++; $display("FAIL GeAr result = exact everywhere"); end
    if (n_mul_diff == 0)     begin failures++; $display("FAIL UDM result = exact everywhere"); end
    if (n_subnormal == 0)    begin failures++; $display("FAIL no subnormal result"); end
    if (n_overflow == 0)     begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
