// conv_engine: streaming 3x3 image convolution over a raster-scanned image.
//
// Input: width_i x height_i pixels, row by row, one 8-bit pixel in the low
// bits of each stream beat. Output: the same number of pixels in the same
// order, pixel (x, y) being
//   g(x, y) = sat( sum_{dy,dx = -1..1} w(dx, dy) * f(x+dx, y+dy) )
// with the weight w(dx, dy) in coef_i[dy+1][dx+1] and sat() clamping to
// 0..255. Border pixels (first and last row and column), where the window
// would leave the image, are output as 0. The last output beat carries TLAST;
// input TLAST is not used, the image size framing the packet.
//
// How it works: the engine walks (width+1) x (height+1) scan positions
// (x, y). At a position inside the image it takes one input pixel; in the
// extra column x = width and extra row y = height it takes none and uses 0.
// The pixel and the two pixels above it, read from the line buffer, form
// the new window column, which the memory window shifts in; the line buffer
// moves the pixel into its column. From x >= 1, y >= 1 on, each position
// emits the output pixel centred at (x-1, y-1), computed by conv_kernel on
// the window including the new column and registered in the output stage.
// The extra row and column let the last outputs leave without more input.
//
// Timing: one scan position per clock when the input has a pixel ready (if
// needed) and the output register is free (if an output is due), so a
// W x H image takes (W+1)(H+1) clocks plus stalls. start_i (one clock)
// rewinds the scan; enable_i must be high while the run lasts; done_o
// pulses when the TLAST beat is taken.
// The line buffer, memory window and computation kernel, the saturation and
// the image sizes follow the accelerator's description; the scan order with
// the extra row and column and the zero border are this design's choices.
module conv_engine
  import accel_pkg::*;
#(
  parameter int unsigned MAX_W = 640,
  parameter arith_e      ARITH = ARITH_EXACT,
  localparam int unsigned COL_W = $clog2(MAX_W)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start_i,
  input  logic                     enable_i,
  input  logic [15:0]              width_i,
  input  logic [15:0]              height_i,
  input  logic signed [COEF_W-1:0] coef_i [KSIZE][KSIZE],
  input  logic [AXIS_W-1:0]        s_axis_tdata,
  input  logic                     s_axis_tvalid,
  output logic                     s_axis_tready,
  input  logic                     s_axis_tlast,
  output logic [AXIS_W-1:0]        m_axis_tdata,
  output logic                     m_axis_tvalid,
  input  logic                     m_axis_tready,
  output logic                     m_axis_tlast,
  output logic                     done_o
);

  logic [15:0]      x, y;
  logic             active;
  logic             need_in, emit, out_free, step, last_pos, interior;
  logic [PIX_W-1:0] pix;
  logic [PIX_W-1:0] above [KSIZE-1];
  logic [PIX_W-1:0] col   [KSIZE];
  logic [PIX_W-1:0] win   [KSIZE][KSIZE];
  logic [PIX_W-1:0] kwin  [KSIZE][KSIZE];
  logic [PIX_W-1:0] g;
  logic signed [SUM_W-1:0] unused_sum;

  assign need_in  = x < width_i && y < height_i;
  assign emit     = x != 0 && y != 0;
  assign out_free = !m_axis_tvalid || m_axis_tready;
  assign last_pos = x == width_i && y == height_i;
  // output centre (x-1, y-1) is inside the border
  assign interior = x >= 16'd2 && x < width_i && y >= 16'd2 && y < height_i;

  assign s_axis_tready = enable_i && active && need_in && (!emit || out_free);
  assign step          = enable_i && active && (!need_in || s_axis_tvalid) && (!emit || out_free);
  assign pix           = need_in ? s_axis_tdata[PIX_W-1:0] : '0;

  line_buffer #(.MAX_W(MAX_W), .PIX_W(PIX_W), .KSIZE(KSIZE)) u_lb (
    .clk, .shift_i(step && x < width_i), .col_i(x[COL_W-1:0]), .pix_i(pix), .rows_o(above)
  );

  always_comb begin
    for (int r = 0; r < KSIZE-1; r++) col[r] = (x < width_i) ? above[r] : '0;
    col[KSIZE-1] = (x < width_i) ? pix : '0;
    // window as it will be after this step's shift
    for (int r = 0; r < KSIZE; r++) begin
      for (int c = 0; c < KSIZE-1; c++) kwin[r][c] = win[r][c+1];
      kwin[r][KSIZE-1] = col[r];
    end
  end

  mem_window #(.PIX_W(PIX_W), .KSIZE(KSIZE)) u_win (
    .clk, .rst_n, .shift_i(step), .col_i(col), .win_o(win)
  );

  conv_kernel #(.ARITH(ARITH)) u_kernel (
    .win_i(kwin), .coef_i, .sum_o(unused_sum), .pix_o(g)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x             <= '0;
      y             <= '0;
      active        <= 1'b0;
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
    end else begin
      if (start_i) begin
        x      <= '0;
        y      <= '0;
        active <= 1'b1;
      end else if (step) begin
        if (x == width_i) begin
          x <= '0;
          y <= y + 16'd1;
        end else begin
          x <= x + 16'd1;
        end
        if (last_pos) active <= 1'b0;
      end

      if (step && emit) begin
        m_axis_tvalid <= 1'b1;
        m_axis_tdata  <= AXIS_W'(interior ? g : '0);
        m_axis_tlast  <= last_pos;
      end else if (m_axis_tready) begin
        m_axis_tvalid <= 1'b0;
      end
    end
  end

  assign done_o = m_axis_tvalid && m_axis_tready && m_axis_tlast;

  a_width_fits: assert property (@(posedge clk) disable iff (!rst_n)
    start_i |-> (width_i >= 16'd1 && 32'(width_i) <= MAX_W && height_i >= 16'd1));

  logic unused;
  assign unused = s_axis_tlast ^ (|s_axis_tdata[AXIS_W-1:PIX_W]) ^ (|unused_sum);

endmodule
