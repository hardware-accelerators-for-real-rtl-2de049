// line_buffer: the previous image rows of a raster-scanned image, one pixel
// per column, for a KSIZE x KSIZE convolution window.
//
// Holds KSIZE-1 rows of MAX_W pixels. For the column col_i of the pixel being
// scanned, rows_o[0] is the pixel of that column two rows up (the oldest
// row) and rows_o[KSIZE-2] the pixel one row up; the read is combinational,
// as from a memory with an asynchronous read port. When shift_i is high the
// column shifts up by one row at the clock edge: each row takes the value of
// the row below it, and the newest row takes pix_i. The storage is one
// memory array per row with no reset (as block or distributed RAM), so
// pixels from before the first rows of an image are undefined and must be
// masked by the user (conv_engine treats them as the image border).
// A multi-row shift register of image lines is the structure the
// convolution is built on; the row-per-array organisation and the
// asynchronous read are this design's choices.
module line_buffer #(
  parameter int unsigned MAX_W = 640,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned KSIZE = 3,
  localparam int unsigned COL_W = $clog2(MAX_W)
) (
  input  logic             clk,
  input  logic             shift_i,
  input  logic [COL_W-1:0] col_i,
  input  logic [PIX_W-1:0] pix_i,
  output logic [PIX_W-1:0] rows_o [KSIZE-1]
);

  for (genvar r = 0; r < KSIZE-1; r++) begin : g_row
    logic [PIX_W-1:0] mem [MAX_W];

    assign rows_o[r] = mem[col_i];

    if (r == KSIZE-2) begin : g_newest
      always_ff @(posedge clk) if (shift_i) mem[col_i] <= pix_i;
    end else begin : g_older
      always_ff @(posedge clk) if (shift_i) mem[col_i] <= rows_o[r+1];
    end
  end

endmodule
