// elu_feature_map: the linear-attention feature map phi(x) = elu(x) + 1,
// element-wise over a ROWS x COLS matrix.
//
// With elu(x) = x for x > 0 and e^x - 1 otherwise (alpha = 1), phi is
//   phi(x) = x + 1   for x > 0
//   phi(x) = e^x     for x <= 0
// which is always positive, so it defines a valid attention similarity.
// One exp_unit per element; the map is fully unrolled like the other
// element-wise operators of the design. alpha = 1 is this design's choice; the
// reference names alpha without giving its value.
//
// Interface: x in, y out, no clock. Timing: purely combinational.
module elu_feature_map
  import tfm_pkg::*;
#(
  parameter int ROWS = WIN_LEN,
  parameter int COLS = D_MODEL
) (
  input  fx_t x [ROWS][COLS],
  output fx_t y [ROWS][COLS]
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      fx_t e;
      exp_unit u_exp (.x(x[r][c]), .y(e));
      assign y[r][c] = (x[r][c] > 0) ? x[r][c] + FX_ONE : e;
    end
  end

endmodule
