// accel_pkg: types and constants shared by the stream accelerators.
//
// All three accelerators (FIR filter, floating-point multiplier, image
// convolution) use the same outer shape: an AXI4-Stream input, an AXI4-Stream
// output, an AXI4-Lite control bus with start/done/idle and interrupt
// registers, and a second AXI4-Lite bus holding the operation's arguments.
// This package holds the widths and register offsets those buses share, the
// selector for the convolution arithmetic, and the AXI response codes.
package accel_pkg;

  // Stream and register widths. 32-bit stream words match a C int per beat.
  localparam int unsigned AXIS_W   = 32;
  localparam int unsigned AXIL_A_W = 8;
  localparam int unsigned AXIL_D_W = 32;

  // Control bus register map (byte offsets).
  localparam logic [AXIL_A_W-1:0] REG_CTRL = 8'h00; // [0] start (W1), [1] done, [2] idle
  localparam logic [AXIL_A_W-1:0] REG_GIE  = 8'h04; // [0] global interrupt enable
  localparam logic [AXIL_A_W-1:0] REG_IER  = 8'h08; // [0] done interrupt enable
  localparam logic [AXIL_A_W-1:0] REG_ISR  = 8'h0C; // [0] done interrupt status, write 1 to clear

  localparam logic [1:0] AXI_RESP_OKAY   = 2'b00;
  localparam logic [1:0] AXI_RESP_SLVERR = 2'b10;

  // Arithmetic used by the convolution's computation kernel.
  typedef enum logic [1:0] {
    ARITH_EXACT      = 2'd0, // exact multiplier and adder
    ARITH_APPROX_ADD = 2'd1, // GeAr(16,4,4) approximate adder
    ARITH_APPROX_MUL = 2'd2  // under-designed (UDM) approximate multiplier
  } arith_e;

  // Convolution geometry: a 3x3 window over 8-bit pixels, 16-bit kernel.
  localparam int unsigned KSIZE   = 3;
  localparam int unsigned PIX_W   = 8;
  localparam int unsigned COEF_W  = 16;
  localparam int unsigned SUM_W   = 16;

  // Convolution configuration bus: kernel words 0..8 (row-major), then
  // image width and height.
  localparam int unsigned CONV_NREGS   = KSIZE*KSIZE + 2;
  localparam int unsigned CONV_REG_W   = KSIZE*KSIZE;
  localparam int unsigned CONV_REG_H   = KSIZE*KSIZE + 1;

  // Bundles used on the ports of the top level, one per bus.
  typedef struct packed {
    logic [AXIL_A_W-1:0]   awaddr;
    logic                  awvalid;
    logic [AXIL_D_W-1:0]   wdata;
    logic [AXIL_D_W/8-1:0] wstrb;
    logic                  wvalid;
    logic                  bready;
    logic [AXIL_A_W-1:0]   araddr;
    logic                  arvalid;
    logic                  rready;
  } axil_req_t;   // master to slave

  typedef struct packed {
    logic                  awready;
    logic                  wready;
    logic [1:0]            bresp;
    logic                  bvalid;
    logic                  arready;
    logic [AXIL_D_W-1:0]   rdata;
    logic [1:0]            rresp;
    logic                  rvalid;
  } axil_rsp_t;   // slave to master

  typedef struct packed {
    logic [AXIS_W-1:0] tdata;
    logic              tvalid;
    logic              tlast;
  } axis_t;       // stream beat; tready travels the other way

  // Accelerators of the top level, in port-array order. Accelerator i has
  // its control bus at AXI4-Lite port 2*i and its argument bus at 2*i+1.
  localparam int unsigned ACC_FIR       = 0;
  localparam int unsigned ACC_HALF      = 1;
  localparam int unsigned ACC_SINGLE    = 2;
  localparam int unsigned ACC_CONV      = 3;
  localparam int unsigned ACC_CONV_AADD = 4;
  localparam int unsigned ACC_CONV_AMUL = 5;
  localparam int unsigned N_ACC         = 6;
  localparam int unsigned N_AXIL        = 2 * N_ACC;

endpackage
