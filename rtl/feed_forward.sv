// feed_forward: the position-wise feed-forward sub-layer of an encoder layer,
//   FFN(x) = ReLU(x * W1^T + b1) * W2^T + b2,
// applied to every row (time step) of a ROWS x D matrix.
//
// Two matmul_engine instances run back to back: the first widens D -> DFF,
// its result passes through the fully unrolled relu_array, and the second
// narrows DFF -> D. The second takes the first's done pulse as its start.
// Structure and ReLU follow the reference; the residual add around this
// sub-layer lives in encoder_layer.
//
// Interface: pulse start while idle; x and the weights must stay stable until
// done. done pulses once; y holds until the next start.
// Timing: done is high (ROWS*DFF + 1) + 1 + (ROWS*D + 1) cycles after start
// (each engine's own latency plus one cycle of hand-over).
module feed_forward
  import tfm_pkg::*;
#(
  parameter int ROWS = WIN_LEN,
  parameter int D    = D_MODEL,
  parameter int DFF  = D_FF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  x  [ROWS][D],
  input  fx_t  w1 [DFF][D],
  input  fx_t  b1 [DFF],
  input  fx_t  w2 [D][DFF],
  input  fx_t  b2 [D],
  output logic busy,
  output logic done,
  output fx_t  y  [ROWS][D]
);

  logic busy1, done1, busy2;
  fx_t  h   [ROWS][DFF];
  fx_t  h_r [ROWS][DFF];

  matmul_engine #(.M(ROWS), .K(D), .N(DFF)) u_fc1 (
    .clk, .rst_n, .start, .a(x), .bt(w1), .bias(b1),
    .busy(busy1), .done(done1), .c(h)
  );

  relu_array #(.ROWS(ROWS), .COLS(DFF)) u_relu (.x(h), .y(h_r));

  matmul_engine #(.M(ROWS), .K(DFF), .N(D)) u_fc2 (
    .clk, .rst_n, .start(done1), .a(h_r), .bt(w2), .bias(b2),
    .busy(busy2), .done(done), .c(y)
  );

  assign busy = busy1 || done1 || busy2;

endmodule
