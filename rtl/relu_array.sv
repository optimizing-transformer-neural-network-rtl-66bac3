// relu_array: element-wise ReLU(x) = max(0, x) over a whole ROWS x COLS matrix.
//
// The reference applies ReLU between the two layers of the feed-forward
// network with the loops fully unrolled and the matrix completely partitioned,
// so every element is clipped at once; this module is that unrolled form.
//
// Interface: x in, y out, no clock. Timing: purely combinational.
module relu_array
  import tfm_pkg::*;
#(
  parameter int ROWS = WIN_LEN,
  parameter int COLS = D_FF
) (
  input  fx_t x [ROWS][COLS],
  output fx_t y [ROWS][COLS]
);

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        y[r][c] = (x[r][c] < 0) ? '0 : x[r][c];
  end

endmodule
