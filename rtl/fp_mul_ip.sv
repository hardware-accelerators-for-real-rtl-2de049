// fp_mul_ip: floating-point multiply-by-constant accelerator.
//
// Every element of the input stream A is multiplied by the constant B held
// on the s_axi_B_AXI bus, and the products leave on stream C. The default
// format is half precision (binary16); EXP_W=8, MAN_W=23 gives the single
// precision version of the same core. Operands sit in the low 1+EXP_W+MAN_W
// bits of each 32-bit stream beat; unused upper result bits are zero.
// Interfaces, as on the core's block symbol: s_axi_B_AXI (register 0 at
// offset 0x00 is B), s_axi_CRTL_AXI (start/done/idle/interrupt, see
// hls_ctrl), input stream A, output stream C, interrupt.
// Timing: one element per clock; the product is registered, so C carries
// the result of an A beat one clock after it is taken. A run starts with a
// write of start to the control bus and ends when the C beat carrying TLAST
// is taken, which raises done and, if enabled, the interrupt. A beats are
// held off while the core is idle.
// The interfaces and the multiply-by-constant function follow the core's
// description; the single-cycle pipelined datapath, the bit placement in the
// stream word and the run protocol are this design's choices.
module fp_mul_ip
  import accel_pkg::*;
#(
  parameter int unsigned EXP_W = 5,
  parameter int unsigned MAN_W = 10
) (
  input  logic                  ap_clk,
  input  logic                  ap_rst_n,
  input  logic [AXIL_A_W-1:0]   s_axi_B_AXI_awaddr,
  input  logic                 s_axi_B_AXI_awvalid,
  output logic                 s_axi_B_AXI_awready,
  input  logic [AXIL_D_W-1:0]   s_axi_B_AXI_wdata,
  input  logic [AXIL_D_W/8-1:0] s_axi_B_AXI_wstrb,
  input  logic                 s_axi_B_AXI_wvalid,
  output logic                 s_axi_B_AXI_wready,
  output logic [1:0]            s_axi_B_AXI_bresp,
  output logic                 s_axi_B_AXI_bvalid,
  input  logic                 s_axi_B_AXI_bready,
  input  logic [AXIL_A_W-1:0]   s_axi_B_AXI_araddr,
  input  logic                 s_axi_B_AXI_arvalid,
  output logic                 s_axi_B_AXI_arready,
  output logic [AXIL_D_W-1:0]   s_axi_B_AXI_rdata,
  output logic [1:0]            s_axi_B_AXI_rresp,
  output logic                 s_axi_B_AXI_rvalid,
  input  logic                 s_axi_B_AXI_rready,
  input  logic [AXIL_A_W-1:0]   s_axi_CRTL_AXI_awaddr,
  input  logic                 s_axi_CRTL_AXI_awvalid,
  output logic                 s_axi_CRTL_AXI_awready,
  input  logic [AXIL_D_W-1:0]   s_axi_CRTL_AXI_wdata,
  input  logic [AXIL_D_W/8-1:0] s_axi_CRTL_AXI_wstrb,
  input  logic                 s_axi_CRTL_AXI_wvalid,
  output logic                 s_axi_CRTL_AXI_wready,
  output logic [1:0]            s_axi_CRTL_AXI_bresp,
  output logic                 s_axi_CRTL_AXI_bvalid,
  input  logic                 s_axi_CRTL_AXI_bready,
  input  logic [AXIL_A_W-1:0]   s_axi_CRTL_AXI_araddr,
  input  logic                 s_axi_CRTL_AXI_arvalid,
  output logic                 s_axi_CRTL_AXI_arready,
  output logic [AXIL_D_W-1:0]   s_axi_CRTL_AXI_rdata,
  output logic [1:0]            s_axi_CRTL_AXI_rresp,
  output logic                 s_axi_CRTL_AXI_rvalid,
  input  logic                 s_axi_CRTL_AXI_rready,
  input  logic [AXIS_W-1:0]     A_tdata,
  input  logic                  A_tvalid,
  output logic                  A_tready,
  input  logic                  A_tlast,
  output logic [AXIS_W-1:0]     C_tdata,
  output logic                  C_tvalid,
  input  logic                  C_tready,
  output logic                  C_tlast,
  output logic                  interrupt
);

  localparam int unsigned FP_W = 1 + EXP_W + MAN_W;

  logic                start, busy, done, take;
  logic [AXIL_D_W-1:0] b_regs [1];
  logic [FP_W-1:0]     product;

  hls_ctrl u_ctrl (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_axi_awaddr(s_axi_CRTL_AXI_awaddr),
    .s_axi_awvalid(s_axi_CRTL_AXI_awvalid),
    .s_axi_awready(s_axi_CRTL_AXI_awready),
    .s_axi_wdata(s_axi_CRTL_AXI_wdata),
    .s_axi_wstrb(s_axi_CRTL_AXI_wstrb),
    .s_axi_wvalid(s_axi_CRTL_AXI_wvalid),
    .s_axi_wready(s_axi_CRTL_AXI_wready),
    .s_axi_bresp(s_axi_CRTL_AXI_bresp),
    .s_axi_bvalid(s_axi_CRTL_AXI_bvalid),
    .s_axi_bready(s_axi_CRTL_AXI_bready),
    .s_axi_araddr(s_axi_CRTL_AXI_araddr),
    .s_axi_arvalid(s_axi_CRTL_AXI_arvalid),
    .s_axi_arready(s_axi_CRTL_AXI_arready),
    .s_axi_rdata(s_axi_CRTL_AXI_rdata),
    .s_axi_rresp(s_axi_CRTL_AXI_rresp),
    .s_axi_rvalid(s_axi_CRTL_AXI_rvalid),
    .s_axi_rready(s_axi_CRTL_AXI_rready),
    .start_o(start), .busy_o(busy), .done_i(done), .interrupt
  );

  axil_regfile #(.NREGS(1)) u_b (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_axi_awaddr(s_axi_B_AXI_awaddr),
    .s_axi_awvalid(s_axi_B_AXI_awvalid),
    .s_axi_awready(s_axi_B_AXI_awready),
    .s_axi_wdata(s_axi_B_AXI_wdata),
    .s_axi_wstrb(s_axi_B_AXI_wstrb),
    .s_axi_wvalid(s_axi_B_AXI_wvalid),
    .s_axi_wready(s_axi_B_AXI_wready),
    .s_axi_bresp(s_axi_B_AXI_bresp),
    .s_axi_bvalid(s_axi_B_AXI_bvalid),
    .s_axi_bready(s_axi_B_AXI_bready),
    .s_axi_araddr(s_axi_B_AXI_araddr),
    .s_axi_arvalid(s_axi_B_AXI_arvalid),
    .s_axi_arready(s_axi_B_AXI_arready),
    .s_axi_rdata(s_axi_B_AXI_rdata),
    .s_axi_rresp(s_axi_B_AXI_rresp),
    .s_axi_rvalid(s_axi_B_AXI_rvalid),
    .s_axi_rready(s_axi_B_AXI_rready),
    .regs_o(b_regs)
  );

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul (
    .a(A_tdata[FP_W-1:0]), .b(b_regs[0][FP_W-1:0]), .y(product)
  );

  assign A_tready = busy && (!C_tvalid || C_tready);
  assign take     = A_tvalid && A_tready;

  always_ff @(posedge ap_clk or negedge ap_rst_n) begin
    if (!ap_rst_n) begin
      C_tvalid <= 1'b0;
      C_tdata  <= '0;
      C_tlast  <= 1'b0;
    end else if (take) begin
      C_tvalid <= 1'b1;
      C_tdata  <= AXIS_W'(product);
      C_tlast  <= A_tlast;
    end else if (C_tready) begin
      C_tvalid <= 1'b0;
    end
  end

  assign done = busy && C_tvalid && C_tready && C_tlast;

  // start is consumed by hls_ctrl itself (it opens busy); nothing to clear here
  logic unused;
  assign unused = start ^ (|A_tdata) ^ (|b_regs[0]);

endmodule
