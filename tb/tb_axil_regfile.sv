// tb_axil_regfile: writes every register over AXI4-Lite, reads it back,
// checks the parallel outputs, byte strobes, and out-of-range accesses.
module tb_axil_regfile;
  localparam int NREGS = 11;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_bfm bus (clk);
  logic [31:0] regs [NREGS];

  axil_regfile #(.NREGS(NREGS)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(bus.awaddr), .s_axi_awvalid(bus.awvalid), .s_axi_awready(bus.awready),
    .s_axi_wdata(bus.wdata), .s_axi_wstrb(bus.wstrb), .s_axi_wvalid(bus.wvalid), .s_axi_wready(bus.wready),
    .s_axi_bresp(bus.bresp), .s_axi_bvalid(bus.bvalid), .s_axi_bready(bus.bready),
    .s_axi_araddr(bus.araddr), .s_axi_arvalid(bus.arvalid), .s_axi_arready(bus.arready),
    .s_axi_rdata(bus.rdata), .s_axi_rresp(bus.rresp), .s_axi_rvalid(bus.rvalid), .s_axi_rready(bus.rready),
    .regs_o(regs)
  );

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] model [NREGS];
  logic [31:0] d;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NREGS; i++) begin
      bus.read(8'(4*i), d);
      check("reset value", d, 32'h0);
    end
    for (int i = 0; i < NREGS; i++) begin
      model[i] = $urandom;
      bus.write(8'(4*i), model[i]);
    end
    for (int i = 0; i < NREGS; i++) begin
      bus.read(8'(4*i), d);
      check($sformatf("readback %0d", i), d, model[i]);
      check($sformatf("regs_o %0d", i), regs[i], model[i]);
    end
    // byte strobes: only byte 1 and 3 of register 2 change
    bus.write(8'h08, 32'hA1B2C3D4, 4'b1010);
    model[2] = {8'hA1, model[2][23:16], 8'hC3, model[2][7:0]};
    bus.read(8'h08, d);
    check("strobed write", d, model[2]);
    // past the last register: write ignored, read zero
    bus.write(8'(4*NREGS), 32'hFFFFFFFF);
    bus.read(8'(4*NREGS), d);
    check("out of range read", d, 32'h0);
    for (int i = 0; i < NREGS; i++) check("unchanged", regs[i], model[i]);
    check("bresp okay", 32'(bus.bresp), 32'h0);
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
