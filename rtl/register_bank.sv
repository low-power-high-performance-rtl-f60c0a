// register_bank: the 5 x 7 register window W over the CFA image.
//
// Five rows of seven registers, each row a shift chain. When shift is high the
// window moves one column: every register takes its right-hand neighbour and the
// rightmost column loads col_in (row 0 = top, i-2). win[r][c] then holds the sample
// at row i-2+r, column j-3+c of the window centred on (i, j); win[2][3] is the
// centre P(i,j). The window updates on the clock edge after shift; reset clears it.
// The 5 x 7 size and the serial register rows follow the document.
module register_bank
  import eodm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  pix_t col_in [WIN_ROWS],
  output pix_t win    [WIN_ROWS][WIN_COLS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < WIN_ROWS; r++)
        for (int c = 0; c < WIN_COLS; c++) win[r][c] <= '0;
    end else if (shift) begin
      for (int r = 0; r < WIN_ROWS; r++) begin
        for (int c = 0; c < WIN_COLS - 1; c++) win[r][c] <= win[r][c+1];
        win[r][WIN_COLS-1] <= col_in[r];
      end
    end
  end
endmodule
