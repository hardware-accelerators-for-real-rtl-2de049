// hls_ctrl: AXI4-Lite control bus of an accelerator (start, done, idle and
// interrupt), the "CTRL bus" every accelerator in this design carries.
//
// Register map (byte offsets, see accel_pkg):
//   0x00 CTRL  bit0 start: write 1 while idle to launch one run; reads 1
//                          while the run is in progress.
//              bit1 done:  set when the datapath reports the end of the run,
//                          cleared by reading CTRL.
//              bit2 idle:  1 when no run is in progress.
//   0x04 GIE   bit0 global interrupt enable.
//   0x08 IER   bit0 enable of the done interrupt.
//   0x0C ISR   bit0 done interrupt status; set with done, write 1 to clear.
// interrupt = GIE & IER & ISR, a level output.
// start_o pulses for one clock in the cycle after the start write is taken;
// busy_o is high from that cycle until the cycle in which done_i is seen.
// The names follow the control bus the accelerators are described with; the
// exact bit layout and the clear-on-read/write-1-to-clear rules are this
// design's choice, modelled on common high-level-synthesis control blocks.
module hls_ctrl
  import accel_pkg::*;
(
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
  // datapath side
  output logic                  start_o,
  output logic                  busy_o,
  input  logic                  done_i,
  output logic                  interrupt
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

  logic done_q, gie_q, ier_q, isr_q, launch;

  // A start write only counts when nothing is running.
  assign launch = wr_en && wr_addr == REG_CTRL && wr_strb[0] && wr_data[0] && !busy_o && !start_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_o <= 1'b0;
      busy_o  <= 1'b0;
      done_q  <= 1'b0;
      gie_q   <= 1'b0;
      ier_q   <= 1'b0;
      isr_q   <= 1'b0;
    end else begin
      start_o <= launch;
      if (start_o)     busy_o <= 1'b1;
      else if (done_i) busy_o <= 1'b0;

      if (done_i && busy_o)                 done_q <= 1'b1;
      else if (rd_en && rd_addr == REG_CTRL) done_q <= 1'b0;

      if (wr_en && wr_strb[0]) begin
        if (wr_addr == REG_GIE) gie_q <= wr_data[0];
        if (wr_addr == REG_IER) ier_q <= wr_data[0];
      end
      if (done_i && busy_o)                                                  isr_q <= 1'b1;
      else if (wr_en && wr_addr == REG_ISR && wr_strb[0] && wr_data[0])      isr_q <= 1'b0;
    end
  end

  always_comb begin
    unique case (rd_addr)
      REG_CTRL: rd_data = {29'd0, !(busy_o || start_o), done_q, busy_o || start_o};
      REG_GIE:  rd_data = {31'd0, gie_q};
      REG_IER:  rd_data = {31'd0, ier_q};
      REG_ISR:  rd_data = {31'd0, isr_q};
      default:  rd_data = '0;
    endcase
  end

  assign interrupt = gie_q && ier_q && isr_q;

endmodule
