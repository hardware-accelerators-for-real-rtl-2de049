// axil_bfm: AXI4-Lite master for testbenches, with write and read tasks.
// Signals change on the falling clock edge; a handshake is judged just after
// that edge, from the values that the next rising edge will see.
interface axil_bfm (input logic clk);
  logic [7:0]  awaddr = '0;
  logic        awvalid = 1'b0;
  logic        awready;
  logic [31:0] wdata = '0;
  logic [3:0]  wstrb = '0;
  logic        wvalid = 1'b0;
  logic        wready;
  logic [1:0]  bresp;
  logic        bvalid;
  logic        bready = 1'b0;
  logic [7:0]  araddr = '0;
  logic        arvalid = 1'b0;
  logic        arready;
  logic [31:0] rdata;
  logic [1:0]  rresp;
  logic        rvalid;
  logic        rready = 1'b0;

  task automatic write(input logic [7:0] a, input logic [31:0] d, input logic [3:0] strb = 4'hF);
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = strb;
    awvalid = 1'b1; wvalid = 1'b1; bready = 1'b1;
    forever begin #1; if (awready && wready) break; @(negedge clk); end
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    forever begin #1; if (bvalid) break; @(negedge clk); end
    @(negedge clk);
    bready = 1'b0;
  endtask

  task automatic read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    forever begin #1; if (arready) break; @(negedge clk); end
    @(negedge clk);
    arvalid = 1'b0;
    forever begin #1; if (rvalid) break; @(negedge clk); end
    d = rdata;
    @(negedge clk);
    rready = 1'b0;
  endtask
endinterface
