// conv_ip: 3x3 image convolution accelerator (edge detection and similar
// kernels) for 8-bit grey images up to MAX_W pixels wide.
//
// Interfaces, shaped like the other accelerators: s_axi_CRTL_BUS (start,
// done, idle, interrupt; see hls_ctrl), s_axi_CONFIG_BUS (argument
// registers, see below), inStream (pixels in raster order, one per 32-bit
// beat, in bits 7..0), outStream (convolved pixels, same order and format,
// TLAST on the last one) and interrupt.
// Configuration registers (byte offset 4*i):
//   0..8  kernel weight w[r][c] at index 3*r+c, signed 16 bits in bits 15..0
//         (r is the row, c the column of the 3x3 kernel)
//   9     image width  (1..MAX_W), bits 15..0
//   10    image height (>= 1),     bits 15..0
// A run converts one whole image: write the configuration, start through the
// control bus, stream width*height pixels in and take width*height pixels
// out; the interrupt status is set when the last output pixel is taken.
// Throughput is one pixel per clock (see conv_engine for the latency).
// ARITH picks exact arithmetic, the GeAr approximate adder or the
// under-designed approximate multiplier; each choice is a separate core.
// The function, pixel and kernel types, saturation and arithmetic variants
// follow the accelerator's description; the register map and the run
// protocol are this design's choices.
module conv_ip
  import accel_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter arith_e      ARITH = ARITH_EXACT
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
  input  logic [AXIL_A_W-1:0]   s_axi_CONFIG_BUS_awaddr,
  input  logic                 s_axi_CONFIG_BUS_awvalid,
  output logic                 s_axi_CONFIG_BUS_awready,
  input  logic [AXIL_D_W-1:0]   s_axi_CONFIG_BUS_wdata,
  input  logic [AXIL_D_W/8-1:0] s_axi_CONFIG_BUS_wstrb,
  input  logic                 s_axi_CONFIG_BUS_wvalid,
  output logic                 s_axi_CONFIG_BUS_wready,
  output logic [1:0]            s_axi_CONFIG_BUS_bresp,
  output logic                 s_axi_CONFIG_BUS_bvalid,
  input  logic                 s_axi_CONFIG_BUS_bready,
  input  logic [AXIL_A_W-1:0]   s_axi_CONFIG_BUS_araddr,
  input  logic                 s_axi_CONFIG_BUS_arvalid,
  output logic                 s_axi_CONFIG_BUS_arready,
  output logic [AXIL_D_W-1:0]   s_axi_CONFIG_BUS_rdata,
  output logic [1:0]            s_axi_CONFIG_BUS_rresp,
  output logic                 s_axi_CONFIG_BUS_rvalid,
  input  logic                 s_axi_CONFIG_BUS_rready,
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

  logic                     start, busy, done;
  logic [AXIL_D_W-1:0]      cfg [CONV_NREGS];
  logic signed [COEF_W-1:0] coef [KSIZE][KSIZE];

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

  axil_regfile #(.NREGS(CONV_NREGS)) u_cfg (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_axi_awaddr(s_axi_CONFIG_BUS_awaddr),
    .s_axi_awvalid(s_axi_CONFIG_BUS_awvalid),
    .s_axi_awready(s_axi_CONFIG_BUS_awready),
    .s_axi_wdata(s_axi_CONFIG_BUS_wdata),
    .s_axi_wstrb(s_axi_CONFIG_BUS_wstrb),
    .s_axi_wvalid(s_axi_CONFIG_BUS_wvalid),
    .s_axi_wready(s_axi_CONFIG_BUS_wready),
    .s_axi_bresp(s_axi_CONFIG_BUS_bresp),
    .s_axi_bvalid(s_axi_CONFIG_BUS_bvalid),
    .s_axi_bready(s_axi_CONFIG_BUS_bready),
    .s_axi_araddr(s_axi_CONFIG_BUS_araddr),
    .s_axi_arvalid(s_axi_CONFIG_BUS_arvalid),
    .s_axi_arready(s_axi_CONFIG_BUS_arready),
    .s_axi_rdata(s_axi_CONFIG_BUS_rdata),
    .s_axi_rresp(s_axi_CONFIG_BUS_rresp),
    .s_axi_rvalid(s_axi_CONFIG_BUS_rvalid),
    .s_axi_rready(s_axi_CONFIG_BUS_rready),
    .regs_o(cfg)
  );

  always_comb
    for (int r = 0; r < KSIZE; r++)
      for (int c = 0; c < KSIZE; c++) coef[r][c] = signed'(cfg[r*KSIZE + c][COEF_W-1:0]);

  conv_engine #(.MAX_W(MAX_W), .ARITH(ARITH)) u_engine (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .start_i(start), .enable_i(busy || start),
    .width_i(cfg[CONV_REG_W][15:0]), .height_i(cfg[CONV_REG_H][15:0]),
    .coef_i(coef),
    .s_axis_tdata(inStream_tdata), .s_axis_tvalid(inStream_tvalid),
    .s_axis_tready(inStream_tready), .s_axis_tlast(inStream_tlast),
    .m_axis_tdata(outStream_tdata), .m_axis_tvalid(outStream_tvalid),
    .m_axis_tready(outStream_tready), .m_axis_tlast(outStream_tlast),
    .done_o(done)
  );

endmodule
