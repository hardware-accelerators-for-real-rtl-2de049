// tb_fir_ip: the FIR accelerator driven as software would: coefficients on
// the ORDER bus, start and interrupt on the CRTL bus, a packet of samples on
// inStream. Checks every output, TLAST, done/idle/interrupt, that samples
// are held off while idle, that a second run starts from rest, and that an
// unstalled packet of N samples completes in N+1 clocks.
module tb_fir_ip;
  import accel_pkg::*;
  localparam int NTAPS = 11;
  localparam int NS    = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_bfm ctl (clk);
  axil_bfm ord (clk);
  logic [31:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic        m_tvalid, m_tready = 1'b0, m_tlast, irq;

  fir_ip #(.NTAPS(NTAPS)) dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_CRTL_BUS_awaddr(ctl.awaddr), .s_axi_CRTL_BUS_awvalid(ctl.awvalid), .s_axi_CRTL_BUS_awready(ctl.awready),
    .s_axi_CRTL_BUS_wdata(ctl.wdata), .s_axi_CRTL_BUS_wstrb(ctl.wstrb), .s_axi_CRTL_BUS_wvalid(ctl.wvalid), .s_axi_CRTL_BUS_wready(ctl.wready),
    .s_axi_CRTL_BUS_bresp(ctl.bresp), .s_axi_CRTL_BUS_bvalid(ctl.bvalid), .s_axi_CRTL_BUS_bready(ctl.bready),
    .s_axi_CRTL_BUS_araddr(ctl.araddr), .s_axi_CRTL_BUS_arvalid(ctl.arvalid), .s_axi_CRTL_BUS_arready(ctl.arready),
    .s_axi_CRTL_BUS_rdata(ctl.rdata), .s_axi_CRTL_BUS_rresp(ctl.rresp), .s_axi_CRTL_BUS_rvalid(ctl.rvalid), .s_axi_CRTL_BUS_rready(ctl.rready),
    .s_axi_ORDER_BUS_awaddr(ord.awaddr), .s_axi_ORDER_BUS_awvalid(ord.awvalid), .s_axi_ORDER_BUS_awready(ord.awready),
    .s_axi_ORDER_BUS_wdata(ord.wdata), .s_axi_ORDER_BUS_wstrb(ord.wstrb), .s_axi_ORDER_BUS_wvalid(ord.wvalid), .s_axi_ORDER_BUS_wready(ord.wready),
    .s_axi_ORDER_BUS_bresp(ord.bresp), .s_axi_ORDER_BUS_bvalid(ord.bvalid), .s_axi_ORDER_BUS_bready(ord.bready),
    .s_axi_ORDER_BUS_araddr(ord.araddr), .s_axi_ORDER_BUS_arvalid(ord.arvalid), .s_axi_ORDER_BUS_arready(ord.arready),
    .s_axi_ORDER_BUS_rdata(ord.rdata), .s_axi_ORDER_BUS_rresp(ord.rresp), .s_axi_ORDER_BUS_rvalid(ord.rvalid), .s_axi_ORDER_BUS_rready(ord.rready),
    .inStream_tdata(s_tdata), .inStream_tvalid(s_tvalid), .inStream_tready(s_tready), .inStream_tlast(s_tlast),
    .outStream_tdata(m_tdata), .outStream_tvalid(m_tvalid), .outStream_tready(m_tready), .outStream_tlast(m_tlast),
    .interrupt(irq)
  );

  int coef [NTAPS];
  int x [NS];
  int y [NS];
  int n_in, n_out, t_first, t_last;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic new_data();
    for (int n = 0; n < NS; n++) x[n] = $urandom_range(2000) - 1000;
    for (int n = 0; n < NS; n++) begin
      int acc = 0;
      for (int k = 0; k < NTAPS; k++) if (n - k >= 0) acc = acc + coef[k] * x[n-k];
      y[n] = acc;
    end
  endtask

  task automatic stream(int pv, int pr);
    n_in = 0; n_out = 0;
    fork
      begin
        while (n_in < NS) begin
          s_tvalid = ($urandom_range(99) < pv);
          s_tdata  = x[n_in];
          s_tlast  = (n_in == NS-1);
          #1;
          if (s_tvalid && s_tready) begin
            if (n_in == 0) t_first = $time;
            n_in++;
          end
          @(negedge clk);
        end
        s_tvalid = 1'b0;
      end
      begin
        while (n_out < NS) begin
          m_tready = ($urandom_range(99) < pr);
          #1;
          if (m_tvalid && m_tready) begin
            check("output sample", 64'(signed'(m_tdata)), 64'(y[n_out]));
            check("tlast", 64'(m_tlast), 64'(n_out == NS-1));
            t_last = $time;
            n_out++;
          end
          @(negedge clk);
        end
        m_tready = 1'b0;
      end
    join
  endtask

  logic [31:0] d;

  initial begin
    for (int k = 0; k < NTAPS; k++) coef[k] = $urandom_range(64) - 32;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NTAPS; k++) ord.write(8'(4*k), 32'(coef[k]));
    for (int k = 0; k < NTAPS; k++) begin
      ord.read(8'(4*k), d);
      check("coefficient readback", 64'(signed'(d)), 64'(coef[k]));
    end
    // idle core holds samples off
    @(negedge clk); s_tvalid = 1'b1; #1;
    check("tready low while idle", 64'(s_tready), 0);
    s_tvalid = 1'b0;
    ctl.write(REG_GIE, 1);
    ctl.write(REG_IER, 1);
    // run 1: no stalls, timing check
    new_data();
    ctl.write(REG_CTRL, 1);
    stream(100, 100);
    check("clocks from first input to last output", (t_last - t_first) / 10, NS);
    @(negedge clk);
    check("interrupt after run", 64'(irq), 1);
    ctl.read(REG_CTRL, d);
    check("done and idle", 64'(d), 6);
    ctl.write(REG_ISR, 1);
    check("interrupt cleared", 64'(irq), 0);
    // run 2: stalls on both sides, filter must start from rest again
    new_data();
    ctl.write(REG_CTRL, 1);
    stream(55, 45);
    @(negedge clk);
    check("interrupt after second run", 64'(irq), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
