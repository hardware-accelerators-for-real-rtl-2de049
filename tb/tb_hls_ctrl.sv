// tb_hls_ctrl: start/busy/done sequencing, done clear-on-read, idle bit,
// interrupt enables and write-1-to-clear status, start ignored while busy.
module tb_hls_ctrl;
  import accel_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_bfm bus (clk);
  logic start, busy, done = 1'b0, irq;
  int   starts = 0;

  hls_ctrl dut (
    .clk, .rst_n,
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid), .s_axi_wready(bus.wready),
    .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid), .s_axi_bready(bus.bready),
    .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid), .s_axi_arready(bus.arready),
    .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp), .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready),
    .start_o(start), .busy_o(busy), .done_i(done), .interrupt(irq)
  );

  always @(negedge clk) if (start) starts++;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic finish_run();
    @(negedge clk); done = 1'b1;
    @(negedge clk); done = 1'b0;
    @(negedge clk);
  endtask

  logic [31:0] d;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bus.read(REG_CTRL, d);
    check("idle after reset", d, 32'h4);
    check("no interrupt", 32'(irq), 0);
    bus.write(REG_GIE, 1);
    bus.write(REG_IER, 1);
    bus.write(REG_CTRL, 1);
    repeat (2) @(negedge clk);
    check("one start pulse", starts, 1);
    check("busy", 32'(busy), 1);
    bus.read(REG_CTRL, d);
    check("running: start=1 idle=0", d, 32'h1);
    bus.write(REG_CTRL, 1);           // ignored while busy
    repeat (2) @(negedge clk);
    check("start ignored while busy", starts, 1);
    finish_run();
    check("not busy after done", 32'(busy), 0);
    check("interrupt raised", 32'(irq), 1);
    bus.read(REG_CTRL, d);
    check("done and idle", d, 32'h6);
    bus.read(REG_CTRL, d);
    check("done cleared by read", d, 32'h4);
    bus.read(REG_ISR, d);
    check("isr set", d, 32'h1);
    bus.write(REG_ISR, 1);
    bus.read(REG_ISR, d);
    check("isr cleared", d, 32'h0);
    check("interrupt dropped", 32'(irq), 0);
    // second run with the interrupt masked by GIE
    bus.write(REG_GIE, 0);
    bus.write(REG_CTRL, 1);
    repeat (2) @(negedge clk);
    check("second start", starts, 2);
    finish_run();
    bus.read(REG_ISR, d);
    check("isr set again", d, 32'h1);
    check("interrupt masked", 32'(irq), 0);
    bus.read(REG_IER, d);
    check("ier readback", d, 32'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
