// tb_fp_mul_ip: the half-precision multiply-by-constant accelerator run as
// software would: B on the s_axi_B_AXI bus, start on the control bus, 1000
// samples on stream A (the sample count used when the core was evaluated).
// Every C beat is compared with the rounded double-precision product; TLAST,
// the interrupt, one element per clock without stalls, and correct results
// under random stalls are checked.
module tb_fp_mul_ip;
  import accel_pkg::*;
  import tb_ref_pkg::*;
  localparam int NS = 1000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_bfm ctl (clk);
  axil_bfm bb (clk);
  logic [31:0] s_tdata = '0, m_tdata;
  logic        s_tvalid = 1'b0, s_tready, s_tlast = 1'b0;
  logic        m_tvalid, m_tready = 1'b0, m_tlast, irq;

  fp_mul_ip dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_B_AXI_awaddr(bb.awaddr), .s_axi_B_AXI_awvalid(bb.awvalid), .s_axi_B_AXI_wdata(bb.wdata), .s_axi_B_AXI_wstrb(bb.wstrb), .s_axi_B_AXI_wvalid(bb.wvalid), .s_axi_B_AXI_bready(bb.bready), .s_axi_B_AXI_araddr(bb.araddr), .s_axi_B_AXI_arvalid(bb.arvalid), .s_axi_B_AXI_rready(bb.rready), .s_axi_B_AXI_awready(bb.awready), .s_axi_B_AXI_wready(bb.wready), .s_axi_B_AXI_bresp(bb.bresp), .s_axi_B_AXI_bvalid(bb.bvalid), .s_axi_B_AXI_arready(bb.arready), .s_axi_B_AXI_rdata(bb.rdata), .s_axi_B_AXI_rresp(bb.rresp), .s_axi_B_AXI_rvalid(bb.rvalid),
    .s_axi_CRTL_AXI_awaddr(ctl.awaddr), .s_axi_CRTL_AXI_awvalid(ctl.awvalid), .s_axi_CRTL_AXI_wdata(ctl.wdata), .s_axi_CRTL_AXI_wstrb(ctl.wstrb), .s_axi_CRTL_AXI_wvalid(ctl.wvalid), .s_axi_CRTL_AXI_bready(ctl.bready), .s_axi_CRTL_AXI_araddr(ctl.araddr), .s_axi_CRTL_AXI_arvalid(ctl.arvalid), .s_axi_CRTL_AXI_rready(ctl.rready), .s_axi_CRTL_AXI_awready(ctl.awready), .s_axi_CRTL_AXI_wready(ctl.wready), .s_axi_CRTL_AXI_bresp(ctl.bresp), .s_axi_CRTL_AXI_bvalid(ctl.bvalid), .s_axi_CRTL_AXI_arready(ctl.arready), .s_axi_CRTL_AXI_rdata(ctl.rdata), .s_axi_CRTL_AXI_rresp(ctl.rresp), .s_axi_CRTL_AXI_rvalid(ctl.rvalid),
    .A_tdata(s_tdata), .A_tvalid(s_tvalid), .A_tready(s_tready), .A_tlast(s_tlast),
    .C_tdata(m_tdata), .C_tvalid(m_tvalid), .C_tready(m_tready), .C_tlast(m_tlast),
    .interrupt(irq)
  );

  logic [15:0] x [NS];
  logic [15:0] y [NS];
  logic [15:0] bval;
  int n_in, n_out, t_first, t_last;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic new_data();
    for (int n = 0; n < NS; n++) begin
      x[n] = 16'($urandom);
      x[n][14:10] = 5'($urandom_range(30, 1));
      if (n % 50 == 7) x[n][14:10] = 5'd0;    // some subnormal inputs
      y[n] = 16'(fp_mul_ref(x[n], bval, 5, 10));
    end
  endtask

  task automatic stream(int pv, int pr);
    n_in = 0; n_out = 0;
    fork
      begin
        while (n_in < NS) begin
          s_tvalid = ($urandom_range(99) < pv);
          s_tdata  = {16'($urandom), x[n_in]};
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
            check("C beat", 64'(m_tdata), 64'(y[n_out]));
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
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ctl.write(REG_GIE, 1);
    ctl.write(REG_IER, 1);
    bval = 16'h3E00;                        // 1.5
    bb.write(8'h00, 32'(bval));
    bb.read(8'h00, d);
    check("B readback", 64'(d), 64'(bval));
    new_data();
    ctl.write(REG_CTRL, 1);
    stream(100, 100);
    check("one element per clock", (t_last - t_first) / 10, NS);
    @(negedge clk);
    check("interrupt", 64'(irq), 1);
    ctl.write(REG_ISR, 1);
    bval = 16'hB0F3;                        // a negative constant below 1
    bb.write(8'h00, 32'(bval));
    new_data();
    ctl.write(REG_CTRL, 1);
    stream(60, 50);
    @(negedge clk);
    check("interrupt after second run", 64'(irq), 1);
    ctl.read(REG_CTRL, d);
    check("done and idle", 64'(d), 6);
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
