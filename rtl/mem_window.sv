// mem_window: KSIZE x KSIZE memory window of shift registers.
//
// win_o[r][c] is the pixel at row r (0 = oldest row, KSIZE-1 = current row)
// and column c (0 = leftmost, KSIZE-1 = newest) of the neighbourhood being
// convolved. All KSIZE*KSIZE pixels are registers and are available at the
// same time. When shift_i is high the window moves one column to the right
// at the clock edge: every column takes the one to its right and the new
// column col_i (col_i[r] for row r, as read from the line buffer plus the
// incoming pixel) enters at c = KSIZE-1. Reset clears the window.
// The window as a 2-D set of shift registers with all elements available at
// once is the structure the convolution is described with; the indexing is
// this design's choice.
module mem_window #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned KSIZE = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_i,
  input  logic [PIX_W-1:0] col_i [KSIZE],
  output logic [PIX_W-1:0] win_o [KSIZE][KSIZE]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < KSIZE; r++)
        for (int c = 0; c < KSIZE; c++) win_o[r][c] <= '0;
    end else if (shift_i) begin
      for (int r = 0; r < KSIZE; r++) begin
        for (int c = 0; c < KSIZE-1; c++) win_o[r][c] <= win_o[r][c+1];
        win_o[r][KSIZE-1] <= col_i[r];
      end
    end
  end

endmodule
