// axil_slave: AXI4-Lite slave handshake engine shared by every register bank.
//
// The module only handles the protocol; the parent decides what the
// registers mean. A write is taken in the cycle where both the address and
// the data channel are valid and no write response is pending: that cycle
// raises wr_en for one clock with wr_addr/wr_data/wr_strb, and the OKAY
// response appears on the B channel the next cycle. A read address is taken
// when no read response is pending: rd_en pulses for one clock with rd_addr,
// the parent returns rd_data combinationally in that same cycle, and the
// registered value is presented on the R channel the next cycle. One
// transaction per channel is outstanding at a time, so a write costs two
// cycles and a read two cycles when the master is always ready.
// The handshake details (joint AW/W acceptance, one outstanding transaction)
// are this design's choice; the register buses themselves are named by the
// accelerators' interface description.
module axil_slave
  import accel_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI4-Lite slave
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
  // register side
  output logic                  wr_en,
  output logic [AXIL_A_W-1:0]   wr_addr,
  output logic [AXIL_D_W-1:0]   wr_data,
  output logic [AXIL_D_W/8-1:0] wr_strb,
  output logic                  rd_en,
  output logic [AXIL_A_W-1:0]   rd_addr,
  input  logic [AXIL_D_W-1:0]   rd_data
);

  assign wr_en         = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_en;
  assign s_axi_wready  = wr_en;
  assign wr_addr       = s_axi_awaddr;
  assign wr_data       = s_axi_wdata;
  assign wr_strb       = s_axi_wstrb;
  assign s_axi_bresp   = AXI_RESP_OKAY;

  assign rd_en         = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = !s_axi_rvalid;
  assign rd_addr       = s_axi_araddr;
  assign s_axi_rresp   = AXI_RESP_OKAY;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (wr_en)
        s_axi_bvalid <= 1'b1;
      else if (s_axi_bready)
        s_axi_bvalid <= 1'b0;
      if (rd_en) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= rd_data;
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // A response, once offered, stays until the master takes it.
  property p_hold(valid, ready);
    @(posedge clk) disable iff (!rst_n) valid && !ready |=> valid;
  endproperty
  a_bvalid_hold: assert property (p_hold(s_axi_bvalid, s_axi_bready));
  a_rvalid_hold: assert property (p_hold(s_axi_rvalid, s_axi_rready));

endmodule
