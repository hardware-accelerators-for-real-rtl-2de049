// axil_regfile: bank of NREGS read/write 32-bit argument registers behind an
// AXI4-Lite slave.
//
// It is the argument bus of each accelerator: the FIR coefficient bus
// (ORDER bus), the constant operand B of the floating-point multiplier and
// the kernel and image size of the convolution. Register i sits at byte
// offset 4*i; byte strobes are honoured; an offset past the last register
// reads as zero and ignores writes. All registers reset to zero. The whole
// bank is visible in parallel on regs_o, so a new value is seen by the
// datapath the cycle after the write is taken (see axil_slave for the bus
// timing). The word layout is this design's choice.
module axil_regfile
  import accel_pkg::*;
#(
  parameter int unsigned NREGS = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [AXIL_A_W-1:0]   s_axi_awaddr,
  input  logic                  s_axi_awvalid,
  output logic                  s_axi_awready,
  input  logic [AXIL_D_W-1:0]   s_axi_wdata,
  input  logic [AXIL_D_W/8-1:0] s_axi_wstrb,
  input  logic                  s_axi_wvalid,
  output logic                  s_axi_wready,
  output logic [1:0]            s_axi_bresp,
  output logic                  s_axi_bvalid,
  input  logic                  s_axi_bready,
  input  logic [AXIL_A_W-1:0]   s_axi_araddr,
  input  logic                  s_axi_arvalid,
  output logic                  s_axi_arready,
  output logic [AXIL_D_W-1:0]   s_axi_rdata,
  output logic [1:0]            s_axi_rresp,
  output logic                  s_axi_rvalid,
  input  logic                  s_axi_rready,
  output logic [AXIL_D_W-1:0]   regs_o [NREGS]
);

  logic                  wr_en, rd_en;
  logic [AXIL_A_W-1:0]   wr_addr, rd_addr;
  logic [AXIL_D_W-1:0]   wr_data, rd_data;
  logic [AXIL_D_W/8-1:0] wr_strb;

  axil_slave u_slave (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .wr_en, .wr_addr, .wr_data, .wr_strb,
    .rd_en, .rd_addr, .rd_data
  );

  logic [AXIL_A_W-3:0] wr_idx, rd_idx;
  assign wr_idx = wr_addr[AXIL_A_W-1:2];
  assign rd_idx = rd_addr[AXIL_A_W-1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs_o[i] <= '0;
    end else if (wr_en && 32'(wr_idx) < NREGS) begin
      for (int b = 0; b < AXIL_D_W/8; b++)
        if (wr_strb[b]) regs_o[wr_idx][8*b +: 8] <= wr_data[8*b +: 8];
    end
  end

  always_comb begin
    rd_data = '0;
    if (32'(rd_idx) < NREGS) rd_data = regs_o[rd_idx];
  end

  // rd_en only matters to registers with read side effects; none here.
  logic unused_rd_en;
  assign unused_rd_en = rd_en;

endmodule
