// accel_top: the programmable-logic side of the accelerator system.
//
// Six stream accelerators stand side by side, each the way a DMA channel and
// the processor's AXI4-Lite interconnect would reach it:
//   ACC_FIR        fir_ip       FIR filter, NTAPS coefficients
//   ACC_HALF       fp_mul_ip    half-precision multiply by a constant
//   ACC_SINGLE     fp_mul_ip    single-precision multiply by a constant
//   ACC_CONV       conv_ip      3x3 convolution, exact arithmetic
//   ACC_CONV_AADD  conv_ip      3x3 convolution, GeAr approximate adder
//   ACC_CONV_AMUL  conv_ip      3x3 convolution, UDM approximate multiplier
// Accelerator i takes its input stream on s_axis[i]/s_axis_tready[i], gives
// its output on m_axis[i]/m_axis_tready[i], has its control bus (start,
// done, idle, interrupt registers) on axil_req/axil_rsp[2*i] and its
// argument bus (coefficients, constant, kernel and image size) on
// axil_req/axil_rsp[2*i+1], and raises interrupt[i] at the end of a run.
// In the full system the processor writes the arguments and starts a core,
// a DMA engine moves the data from memory into s_axis[i] and the results
// from m_axis[i] back to memory, and the interrupt tells the processor the
// run is over. The processor, DMA, interconnect, timer and reset generator
// are vendor parts outside this RTL; their connection points are the ports
// here. All cores share one clock and an active-low reset.
// The set of accelerators and their interfaces follow the system's
// description; the port bundling and ordering are this design's choices.
module accel_top
  import accel_pkg::*;
#(
  parameter int unsigned FIR_NTAPS  = 11,
  parameter int unsigned CONV_MAX_W = 640
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t axil_req      [N_AXIL],
  output axil_rsp_t axil_rsp      [N_AXIL],
  input  axis_t     s_axis        [N_ACC],
  output logic      s_axis_tready [N_ACC],
  output axis_t     m_axis        [N_ACC],
  input  logic      m_axis_tready [N_ACC],
  output logic      interrupt     [N_ACC]
);

  fir_ip #(.NTAPS(FIR_NTAPS)) u_fir (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_CRTL_BUS_awaddr(axil_req[2*ACC_FIR].awaddr),
    .s_axi_CRTL_BUS_awvalid(axil_req[2*ACC_FIR].awvalid),
    .s_axi_CRTL_BUS_wdata(axil_req[2*ACC_FIR].wdata),
    .s_axi_CRTL_BUS_wstrb(axil_req[2*ACC_FIR].wstrb),
    .s_axi_CRTL_BUS_wvalid(axil_req[2*ACC_FIR].wvalid),
    .s_axi_CRTL_BUS_bready(axil_req[2*ACC_FIR].bready),
    .s_axi_CRTL_BUS_araddr(axil_req[2*ACC_FIR].araddr),
    .s_axi_CRTL_BUS_arvalid(axil_req[2*ACC_FIR].arvalid),
    .s_axi_CRTL_BUS_rready(axil_req[2*ACC_FIR].rready),
    .s_axi_CRTL_BUS_awready(axil_rsp[2*ACC_FIR].awready),
    .s_axi_CRTL_BUS_wready(axil_rsp[2*ACC_FIR].wready),
    .s_axi_CRTL_BUS_bresp(axil_rsp[2*ACC_FIR].bresp),
    .s_axi_CRTL_BUS_bvalid(axil_rsp[2*ACC_FIR].bvalid),
    .s_axi_CRTL_BUS_arready(axil_rsp[2*ACC_FIR].arready),
    .s_axi_CRTL_BUS_rdata(axil_rsp[2*ACC_FIR].rdata),
    .s_axi_CRTL_BUS_rresp(axil_rsp[2*ACC_FIR].rresp),
    .s_axi_CRTL_BUS_rvalid(axil_rsp[2*ACC_FIR].rvalid),
    .s_axi_ORDER_BUS_awaddr(axil_req[2*ACC_FIR+1].awaddr),
    .s_axi_ORDER_BUS_awvalid(axil_req[2*ACC_FIR+1].awvalid),
    .s_axi_ORDER_BUS_wdata(axil_req[2*ACC_FIR+1].wdata),
    .s_axi_ORDER_BUS_wstrb(axil_req[2*ACC_FIR+1].wstrb),
    .s_axi_ORDER_BUS_wvalid(axil_req[2*ACC_FIR+1].wvalid),
    .s_axi_ORDER_BUS_bready(axil_req[2*ACC_FIR+1].bready),
    .s_axi_ORDER_BUS_araddr(axil_req[2*ACC_FIR+1].araddr),
    .s_axi_ORDER_BUS_arvalid(axil_req[2*ACC_FIR+1].arvalid),
    .s_axi_ORDER_BUS_rready(axil_req[2*ACC_FIR+1].rready),
    .s_axi_ORDER_BUS_awready(axil_rsp[2*ACC_FIR+1].awready),
    .s_axi_ORDER_BUS_wready(axil_rsp[2*ACC_FIR+1].wready),
    .s_axi_ORDER_BUS_bresp(axil_rsp[2*ACC_FIR+1].bresp),
    .s_axi_ORDER_BUS_bvalid(axil_rsp[2*ACC_FIR+1].bvalid),
    .s_axi_ORDER_BUS_arready(axil_rsp[2*ACC_FIR+1].arready),
    .s_axi_ORDER_BUS_rdata(axil_rsp[2*ACC_FIR+1].rdata),
    .s_axi_ORDER_BUS_rresp(axil_rsp[2*ACC_FIR+1].rresp),
    .s_axi_ORDER_BUS_rvalid(axil_rsp[2*ACC_FIR+1].rvalid),
    .inStream_tdata(s_axis[ACC_FIR].tdata), .inStream_tvalid(s_axis[ACC_FIR].tvalid),
    .inStream_tready(s_axis_tready[ACC_FIR]), .inStream_tlast(s_axis[ACC_FIR].tlast),
    .outStream_tdata(m_axis[ACC_FIR].tdata), .outStream_tvalid(m_axis[ACC_FIR].tvalid),
    .outStream_tready(m_axis_tready[ACC_FIR]), .outStream_tlast(m_axis[ACC_FIR].tlast),
    .interrupt(interrupt[ACC_FIR])
  );

  fp_mul_ip #(.EXP_W(5), .MAN_W(10)) u_half (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_B_AXI_awaddr(axil_req[2*ACC_HALF+1].awaddr),
    .s_axi_B_AXI_awvalid(axil_req[2*ACC_HALF+1].awvalid),
    .s_axi_B_AXI_wdata(axil_req[2*ACC_HALF+1].wdata),
    .s_axi_B_AXI_wstrb(axil_req[2*ACC_HALF+1].wstrb),
    .s_axi_B_AXI_wvalid(axil_req[2*ACC_HALF+1].wvalid),
    .s_axi_B_AXI_bready(axil_req[2*ACC_HALF+1].bready),
    .s_axi_B_AXI_araddr(axil_req[2*ACC_HALF+1].araddr),
    .s_axi_B_AXI_arvalid(axil_req[2*ACC_HALF+1].arvalid),
    .s_axi_B_AXI_rready(axil_req[2*ACC_HALF+1].rready),
    .s_axi_B_AXI_awready(axil_rsp[2*ACC_HALF+1].awready),
    .s_axi_B_AXI_wready(axil_rsp[2*ACC_HALF+1].wready),
    .s_axi_B_AXI_bresp(axil_rsp[2*ACC_HALF+1].bresp),
    .s_axi_B_AXI_bvalid(axil_rsp[2*ACC_HALF+1].bvalid),
    .s_axi_B_AXI_arready(axil_rsp[2*ACC_HALF+1].arready),
    .s_axi_B_AXI_rdata(axil_rsp[2*ACC_HALF+1].rdata),
    .s_axi_B_AXI_rresp(axil_rsp[2*ACC_HALF+1].rresp),
    .s_axi_B_AXI_rvalid(axil_rsp[2*ACC_HALF+1].rvalid),
    .s_axi_CRTL_AXI_awaddr(axil_req[2*ACC_HALF].awaddr),
    .s_axi_CRTL_AXI_awvalid(axil_req[2*ACC_HALF].awvalid),
    .s_axi_CRTL_AXI_wdata(axil_req[2*ACC_HALF].wdata),
    .s_axi_CRTL_AXI_wstrb(axil_req[2*ACC_HALF].wstrb),
    .s_axi_CRTL_AXI_wvalid(axil_req[2*ACC_HALF].wvalid),
    .s_axi_CRTL_AXI_bready(axil_req[2*ACC_HALF].bready),
    .s_axi_CRTL_AXI_araddr(axil_req[2*ACC_HALF].araddr),
    .s_axi_CRTL_AXI_arvalid(axil_req[2*ACC_HALF].arvalid),
    .s_axi_CRTL_AXI_rready(axil_req[2*ACC_HALF].rready),
    .s_axi_CRTL_AXI_awready(axil_rsp[2*ACC_HALF].awready),
    .s_axi_CRTL_AXI_wready(axil_rsp[2*ACC_HALF].wready),
    .s_axi_CRTL_AXI_bresp(axil_rsp[2*ACC_HALF].bresp),
    .s_axi_CRTL_AXI_bvalid(axil_rsp[2*ACC_HALF].bvalid),
    .s_axi_CRTL_AXI_arready(axil_rsp[2*ACC_HALF].arready),
    .s_axi_CRTL_AXI_rdata(axil_rsp[2*ACC_HALF].rdata),
    .s_axi_CRTL_AXI_rresp(axil_rsp[2*ACC_HALF].rresp),
    .s_axi_CRTL_AXI_rvalid(axil_rsp[2*ACC_HALF].rvalid),
    .A_tdata(s_axis[ACC_HALF].tdata), .A_tvalid(s_axis[ACC_HALF].tvalid),
    .A_tready(s_axis_tready[ACC_HALF]), .A_tlast(s_axis[ACC_HALF].tlast),
    .C_tdata(m_axis[ACC_HALF].tdata), .C_tvalid(m_axis[ACC_HALF].tvalid),
    .C_tready(m_axis_tready[ACC_HALF]), .C_tlast(m_axis[ACC_HALF].tlast),
    .interrupt(interrupt[ACC_HALF])
  );

  fp_mul_ip #(.EXP_W(8), .MAN_W(23)) u_single (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_B_AXI_awaddr(axil_req[2*ACC_SINGLE+1].awaddr),
    .s_axi_B_AXI_awvalid(axil_req[2*ACC_SINGLE+1].awvalid),
    .s_axi_B_AXI_wdata(axil_req[2*ACC_SINGLE+1].wdata),
    .s_axi_B_AXI_wstrb(axil_req[2*ACC_SINGLE+1].wstrb),
    .s_axi_B_AXI_wvalid(axil_req[2*ACC_SINGLE+1].wvalid),
    .s_axi_B_AXI_bready(axil_req[2*ACC_SINGLE+1].bready),
    .s_axi_B_AXI_araddr(axil_req[2*ACC_SINGLE+1].araddr),
    .s_axi_B_AXI_arvalid(axil_req[2*ACC_SINGLE+1].arvalid),
    .s_axi_B_AXI_rready(axil_req[2*ACC_SINGLE+1].rready),
    .s_axi_B_AXI_awready(axil_rsp[2*ACC_SINGLE+1].awready),
    .s_axi_B_AXI_wready(axil_rsp[2*ACC_SINGLE+1].wready),
    .s_axi_B_AXI_bresp(axil_rsp[2*ACC_SINGLE+1].bresp),
    .s_axi_B_AXI_bvalid(axil_rsp[2*ACC_SINGLE+1].bvalid),
    .s_axi_B_AXI_arready(axil_rsp[2*ACC_SINGLE+1].arready),
    .s_axi_B_AXI_rdata(axil_rsp[2*ACC_SINGLE+1].rdata),
    .s_axi_B_AXI_rresp(axil_rsp[2*ACC_SINGLE+1].rresp),
    .s_axi_B_AXI_rvalid(axil_rsp[2*ACC_SINGLE+1].rvalid),
    .s_axi_CRTL_AXI_awaddr(axil_req[2*ACC_SINGLE].awaddr),
    .s_axi_CRTL_AXI_awvalid(axil_req[2*ACC_SINGLE].awvalid),
    .s_axi_CRTL_AXI_wdata(axil_req[2*ACC_SINGLE].wdata),
    .s_axi_CRTL_AXI_wstrb(axil_req[2*ACC_SINGLE].wstrb),
    .s_axi_CRTL_AXI_wvalid(axil_req[2*ACC_SINGLE].wvalid),
    .s_axi_CRTL_AXI_bready(axil_req[2*ACC_SINGLE].bready),
    .s_axi_CRTL_AXI_araddr(axil_req[2*ACC_SINGLE].araddr),
    .s_axi_CRTL_AXI_arvalid(axil_req[2*ACC_SINGLE].arvalid),
    .s_axi_CRTL_AXI_rready(axil_req[2*ACC_SINGLE].rready),
    .s_axi_CRTL_AXI_awready(axil_rsp[2*ACC_SINGLE].awready),
    .s_axi_CRTL_AXI_wready(axil_rsp[2*ACC_SINGLE].wready),
    .s_axi_CRTL_AXI_bresp(axil_rsp[2*ACC_SINGLE].bresp),
    .s_axi_CRTL_AXI_bvalid(axil_rsp[2*ACC_SINGLE].bvalid),
    .s_axi_CRTL_AXI_arready(axil_rsp[2*ACC_SINGLE].arready),
    .s_axi_CRTL_AXI_rdata(axil_rsp[2*ACC_SINGLE].rdata),
    .s_axi_CRTL_AXI_rresp(axil_rsp[2*ACC_SINGLE].rresp),
    .s_axi_CRTL_AXI_rvalid(axil_rsp[2*ACC_SINGLE].rvalid),
    .A_tdata(s_axis[ACC_SINGLE].tdata), .A_tvalid(s_axis[ACC_SINGLE].tvalid),
    .A_tready(s_axis_tready[ACC_SINGLE]), .A_tlast(s_axis[ACC_SINGLE].tlast),
    .C_tdata(m_axis[ACC_SINGLE].tdata), .C_tvalid(m_axis[ACC_SINGLE].tvalid),
    .C_tready(m_axis_tready[ACC_SINGLE]), .C_tlast(m_axis[ACC_SINGLE].tlast),
    .interrupt(interrupt[ACC_SINGLE])
  );

  localparam arith_e CONV_ARITH [3] = '{ARITH_EXACT, ARITH_APPROX_ADD, ARITH_APPROX_MUL};

  for (genvar k = 0; k < 3; k++) begin : g_conv
    localparam int unsigned I = ACC_CONV + k;
    conv_ip #(.MAX_W(CONV_MAX_W), .ARITH(CONV_ARITH[k])) u_conv (
      .ap_clk(clk), .ap_rst_n(rst_n),
      .s_axi_CRTL_BUS_awaddr(axil_req[2*I].awaddr),
      .s_axi_CRTL_BUS_awvalid(axil_req[2*I].awvalid),
      .s_axi_CRTL_BUS_wdata(axil_req[2*I].wdata),
      .s_axi_CRTL_BUS_wstrb(axil_req[2*I].wstrb),
      .s_axi_CRTL_BUS_wvalid(axil_req[2*I].wvalid),
      .s_axi_CRTL_BUS_bready(axil_req[2*I].bready),
      .s_axi_CRTL_BUS_araddr(axil_req[2*I].araddr),
      .s_axi_CRTL_BUS_arvalid(axil_req[2*I].arvalid),
      .s_axi_CRTL_BUS_rready(axil_req[2*I].rready),
      .s_axi_CRTL_BUS_awready(axil_rsp[2*I].awready),
      .s_axi_CRTL_BUS_wready(axil_rsp[2*I].wready),
      .s_axi_CRTL_BUS_bresp(axil_rsp[2*I].bresp),
      .s_axi_CRTL_BUS_bvalid(axil_rsp[2*I].bvalid),
      .s_axi_CRTL_BUS_arready(axil_rsp[2*I].arready),
      .s_axi_CRTL_BUS_rdata(axil_rsp[2*I].rdata),
      .s_axi_CRTL_BUS_rresp(axil_rsp[2*I].rresp),
      .s_axi_CRTL_BUS_rvalid(axil_rsp[2*I].rvalid),
      .s_axi_CONFIG_BUS_awaddr(axil_req[2*I+1].awaddr),
      .s_axi_CONFIG_BUS_awvalid(axil_req[2*I+1].awvalid),
      .s_axi_CONFIG_BUS_wdata(axil_req[2*I+1].wdata),
      .s_axi_CONFIG_BUS_wstrb(axil_req[2*I+1].wstrb),
      .s_axi_CONFIG_BUS_wvalid(axil_req[2*I+1].wvalid),
      .s_axi_CONFIG_BUS_bready(axil_req[2*I+1].bready),
      .s_axi_CONFIG_BUS_araddr(axil_req[2*I+1].araddr),
      .s_axi_CONFIG_BUS_arvalid(axil_req[2*I+1].arvalid),
      .s_axi_CONFIG_BUS_rready(axil_req[2*I+1].rready),
      .s_axi_CONFIG_BUS_awready(axil_rsp[2*I+1].awready),
      .s_axi_CONFIG_BUS_wready(axil_rsp[2*I+1].wready),
      .s_axi_CONFIG_BUS_bresp(axil_rsp[2*I+1].bresp),
      .s_axi_CONFIG_BUS_bvalid(axil_rsp[2*I+1].bvalid),
      .s_axi_CONFIG_BUS_arready(axil_rsp[2*I+1].arready),
      .s_axi_CONFIG_BUS_rdata(axil_rsp[2*I+1].rdata),
      .s_axi_CONFIG_BUS_rresp(axil_rsp[2*I+1].rresp),
      .s_axi_CONFIG_BUS_rvalid(axil_rsp[2*I+1].rvalid),
      .inStream_tdata(s_axis[I].tdata), .inStream_tvalid(s_axis[I].tvalid),
      .inStream_tready(s_axis_tready[I]), .inStream_tlast(s_axis[I].tlast),
      .outStream_tdata(m_axis[I].tdata), .outStream_tvalid(m_axis[I].tvalid),
      .outStream_tready(m_axis_tready[I]), .outStream_tlast(m_axis[I].tlast),
      .interrupt(interrupt[I])
    );
  end

endmodule
