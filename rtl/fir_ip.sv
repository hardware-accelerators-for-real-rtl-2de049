// fir_ip: the FIR filter accelerator as seen by the processor.
//
// Interfaces, as in the accelerator's block symbol: s_axi_CRTL_BUS (control:
// start, done, idle, interrupt registers, see hls_ctrl), s_axi_ORDER_BUS
// (the NTAPS filter coefficients, coefficient k at byte offset 4*k),
// inStream (input samples) and outStream (filtered samples), all AXI4-Stream
// beats 32 bits wide, and the interrupt output.
// Operation: software writes the coefficients, starts the core through the
// control bus, and the DMA streams one packet of samples in. The filter
// (fir_filter) clears its delay line at start, accepts one sample per clock
// while running and emits one output per input one clock later; the run
// ends when the output beat carrying TLAST is taken, which sets done and the
// interrupt status. Samples offered while the core is idle are held off
// (inStream_tready low).
// The interface set follows the accelerator's description; the packet-per-
// run protocol and the register layout are this design's choices.
module fir_ip
  import accel_pkg::*;
#(
  parameter int unsigned NTAPS = 11
) (
  input  logic                  ap_clk,
  input  logic                  ap_rst_n,
  input  logic [AXIL_A_W-1:0]   s_axi_CRTL_BUS_awaddr,
  input  logic                 s_axi_CRTL_BUS_awvalid,
  output logic                 s_axi_CRTL_BUS_awready,
  input  logic [AXIL_D_W-1:0]   s_axi_CRTL_BUS_wdata,
  input  logic [AXIL_D_W/8-1:0] s_axi_CRTL_BUS_wstrb,
  input  logic                 s_axi_CRTL_BUS_wvalid,
  output logic                 s_axi_CRTL_BUS_wready,
  output logic [1:0]            s_axi_CRTL_BUS_bresp,
  output logic                 s_axi_CRTL_BUS_bvalid,
  input  logic                 s_axi_CRTL_BUS_bready,
  input  logic [AXIL_A_W-1:0]   s_axi_CRTL_BUS_araddr,
  input  logic                 s_axi_CRTL_BUS_arvalid,
  output logic                 s_axi_CRTL_BUS_arready,
  output logic [AXIL_D_W-1:0]   s_axi_CRTL_BUS_rdata,
  output logic [1:0]            s_axi_CRTL_BUS_rresp,
  output logic                 s_axi_CRTL_BUS_rvalid,
  input  logic                 s_axi_CRTL_BUS_rready,
  input  logic [AXIL_A_W-1:0]   s_axi_ORDER_BUS_awaddr,
  input  logic                 s_axi_ORDER_BUS_awvalid,
  output logic                 s_axi_ORDER_BUS_awready,
  input  logic [AXIL_D_W-1:0]   s_axi_ORDER_BUS_wdata,
  input  logic [AXIL_D_W/8-1:0] s_axi_ORDER_BUS_wstrb,
  input  logic                 s_axi_ORDER_BUS_wvalid,
  output logic                 s_axi_ORDER_BUS_wready,
  output logic [1:0]            s_axi_ORDER_BUS_bresp,
  output logic                 s_axi_ORDER_BUS_bvalid,
  input  logic                 s_axi_ORDER_BUS_bready,
  input  logic [AXIL_A_W-1:0]   s_axi_ORDER_BUS_araddr,
  input  logic                 s_axi_ORDER_BUS_arvalid,
  output logic                 s_axi_ORDER_BUS_arready,
  output logic [AXIL_D_W-1:0]   s_axi_ORDER_BUS_rdata,
  output logic [1:0]            s_axi_ORDER_BUS_rresp,
  output logic                 s_axi_ORDER_BUS_rvalid,
  input  logic                 s_axi_ORDER_BUS_rready,
  input  logic [AXIS_W-1:0]     inStream_tdata,
  input  logic                  inStream_tvalid,
  output logic                  inStream_tready,
  input  logic                  inStream_tlast,
  output logic [AXIS_W-1:0]     outStream_tdata,
  output logic                  outStream_tvalid,
  input  logic                  outStream_tready,
  output logic                  outStream_tlast,
  output logic                  interrupt
);

  logic                start, busy, done;
  logic [AXIL_D_W-1:0] coef_regs [NTAPS];
  logic signed [AXIS_W-1:0] coef [NTAPS];

  hls_ctrl u_ctrl (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_axi_awaddr(s_axi_CRTL_BUS_awaddr),
    .s_axi_awvalid(s_axi_CRTL_BUS_awvalid),
    .s_axi_awready(s_axi_CRTL_BUS_awready),
    .s_axi_wdata(s_axi_CRTL_BUS_wdata),
    .s_axi_wstrb(s_axi_CRTL_BUS_wstrb),
    .s_axi_wvalid(s_axi_CRTL_BUS_wvalid),
    .s_axi_wready(s_axi_CRTL_BUS_wready),
    .s_axi_bresp(s_axi_CRTL_BUS_bresp),
    .s_axi_bvalid(s_axi_CRTL_BUS_bvalid),
    .s_axi_bready(s_axi_CRTL_BUS_bready),
    .s_axi_araddr(s_axi_CRTL_BUS_araddr),
    .s_axi_arvalid(s_axi_CRTL_BUS_arvalid),
    .s_axi_arready(s_axi_CRTL_BUS_arready),
    .s_axi_rdata(s_axi_CRTL_BUS_rdata),
    .s_axi_rresp(s_axi_CRTL_BUS_rresp),
    .s_axi_rvalid(s_axi_CRTL_BUS_rvalid),
    .s_axi_rready(s_axi_CRTL_BUS_rready),
    .start_o(start), .busy_o(busy), .done_i(done), .interrupt
  );

  axil_regfile #(.NREGS(NTAPS)) u_order (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_axi_awaddr(s_axi_ORDER_BUS_awaddr),
    .s_axi_awvalid(s_axi_ORDER_BUS_awvalid),
    .s_axi_awready(s_axi_ORDER_BUS_awready),
    .s_axi_wdata(s_axi_ORDER_BUS_wdata),
    .s_axi_wstrb(s_axi_ORDER_BUS_wstrb),
    .s_axi_wvalid(s_axi_ORDER_BUS_wvalid),
    .s_axi_wready(s_axi_ORDER_BUS_wready),
    .s_axi_bresp(s_axi_ORDER_BUS_bresp),
    .s_axi_bvalid(s_axi_ORDER_BUS_bvalid),
    .s_axi_bready(s_axi_ORDER_BUS_bready),
    .s_axi_araddr(s_axi_ORDER_BUS_araddr),
    .s_axi_arvalid(s_axi_ORDER_BUS_arvalid),
    .s_axi_arready(s_axi_ORDER_BUS_arready),
    .s_axi_rdata(s_axi_ORDER_BUS_rdata),
    .s_axi_rresp(s_axi_ORDER_BUS_rresp),
    .s_axi_rvalid(s_axi_ORDER_BUS_rvalid),
    .s_axi_rready(s_axi_ORDER_BUS_rready),
    .regs_o(coef_regs)
  );

  always_comb
    for (int k = 0; k < NTAPS; k++) coef[k] = signed'(coef_regs[k]);

  fir_filter #(.NTAPS(NTAPS), .DATA_W(AXIS_W)) u_fir (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .enable_i(busy), .clear_i(start), .coef_i(coef),
    .s_axis_tdata(inStream_tdata), .s_axis_tvalid(inStream_tvalid),
    .s_axis_tready(inStream_tready), .s_axis_tlast(inStream_tlast),
    .m_axis_tdata(outStream_tdata), .m_axis_tvalid(outStream_tvalid),
    .m_axis_tready(outStream_tready), .m_axis_tlast(outStream_tlast)
  );

  assign done = busy && outStream_tvalid && outStream_tready && outStream_tlast;

endmodule
