// tb_conv_ip: the convolution accelerator (exact arithmetic, default
// 640-pixel line buffer) run as software would: kernel and image size on
// the configuration bus, start and interrupt on the control bus, pixels on
// the streams. A 320x240 image with the 8-neighbour edge kernel runs without
// stalls and must finish in (W+1)(H+1) clocks plus the output register; a
// smaller image with the diagonal kernel and one with an asymmetric
// (horizontal-gradient) kernel run with random stalls. Every
// output pixel is checked.
module tb_conv_ip;
  import accel_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_bfm ctl (clk);
  axil_bfm cfg (clk);
  logic [31:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic        m_tvalid, m_tready = 1'b0, m_tlast, irq;

  conv_ip dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_CRTL_BUS_awaddr(ctl.awaddr), .s_axi_CRTL_BUS_awvalid(ctl.awvalid), .s_axi_CRTL_BUS_wdata(ctl.wdata), .s_axi_CRTL_BUS_wstrb(ctl.wstrb), .s_axi_CRTL_BUS_wvalid(ctl.wvalid), .s_axi_CRTL_BUS_bready(ctl.bready), .s_axi_CRTL_BUS_araddr(ctl.araddr), .s_axi_CRTL_BUS_arvalid(ctl.arvalid), .s_axi_CRTL_BUS_rready(ctl.rready), .s_axi_CRTL_BUS_awready(ctl.awready), .s_axi_CRTL_BUS_wready(ctl.wready), .s_axi_CRTL_BUS_bresp(ctl.bresp), .s_axi_CRTL_BUS_bvalid(ctl.bvalid), .s_axi_CRTL_BUS_arready(ctl.arready), .s_axi_CRTL_BUS_rdata(ctl.rdata), .s_axi_CRTL_BUS_rresp(ctl.rresp), .s_axi_CRTL_BUS_rvalid(ctl.rvalid),
    .s_axi_CONFIG_BUS_awaddr(cfg.awaddr), .s_axi_CONFIG_BUS_awvalid(cfg.awvalid), .s_axi_CONFIG_BUS_wdata(cfg.wdata), .s_axi_CONFIG_BUS_wstrb(cfg.wstrb), .s_axi_CONFIG_BUS_wvalid(cfg.wvalid), .s_axi_CONFIG_BUS_bready(cfg.bready), .s_axi_CONFIG_BUS_araddr(cfg.araddr), .s_axi_CONFIG_BUS_arvalid(cfg.arvalid), .s_axi_CONFIG_BUS_rready(cfg.rready), .s_axi_CONFIG_BUS_awready(cfg.awready), .s_axi_CONFIG_BUS_wready(cfg.wready), .s_axi_CONFIG_BUS_bresp(cfg.bresp), .s_axi_CONFIG_BUS_bvalid(cfg.bvalid), .s_axi_CONFIG_BUS_arready(cfg.arready), .s_axi_CONFIG_BUS_rdata(cfg.rdata), .s_axi_CONFIG_BUS_rresp(cfg.rresp), .s_axi_CONFIG_BUS_rvalid(cfg.rvalid),
    .inStream_tdata(s_tdata), .inStream_tvalid(s_tvalid), .inStream_tready(s_tready), .inStream_tlast(s_tlast),
    .outStream_tdata(m_tdata), .outStream_tvalid(m_tvalid), .outStream_tready(m_tready), .outStream_tlast(m_tlast),
    .interrupt(irq)
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

  task automatic run_image(int w, int h, int pv, int pr, int seed, output int cycles);
    int n = w * h, n_in = 0, n_out = 0, t0;
    img = new[n];
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) img[y*w + x] = img_pix(x, y, w, h, seed);
    for (int i = 0; i < 9; i++) cfg.write(8'(4*i), 32'(k[i/3][i%3]));
    cfg.write(8'(4*CONV_REG_W), 32'(w));
    cfg.write(8'(4*CONV_REG_H), 32'(h));
    ctl.write(REG_CTRL, 1);
    t0 = $time;
    fork
      begin
        while (n_in < n) begin
          s_tvalid = ($urandom_range(99) < pv);
          s_tdata  = 32'(img[n_in]);
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
            check($sformatf("%0dx%0d pixel %0d", w, h, n_out), int'(m_tdata),
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
  endtask

  int cyc;
  logic [31:0] d;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ctl.write(REG_GIE, 1);
    ctl.write(REG_IER, 1);
    k = '{'{-1,-1,-1}, '{-1,8,-1}, '{-1,-1,-1}};
    run_image(320, 240, 100, 100, 11, cyc);
    // the control write ends one clock after the start is taken
    check("clocks for 320x240", cyc, 321 * 241 + 1);
    @(negedge clk);
    check("interrupt", int'(irq), 1);
    ctl.read(REG_CTRL, d);
    check("done and idle", int'(d), 6);
    ctl.write(REG_ISR, 1);
    k = '{'{1,0,-1}, '{0,0,0}, '{-1,0,1}};
    run_image(41, 19, 60, 50, 12, cyc);
    @(negedge clk);
    check("interrupt after second image", int'(irq), 1);
    ctl.write(REG_ISR, 1);
    // an asymmetric kernel, so that a row/column mix-up shows
    k = '{'{-1,0,1}, '{-2,0,2}, '{-1,0,1}};
    run_image(30, 14, 80, 80, 13, cyc);
    @(negedge clk);
    check("interrupt after third image", int'(irq), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
