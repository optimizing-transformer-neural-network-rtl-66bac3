// classifier_head: the linear output layer that turns each encoder output row
// into an anomaly score and decision,
//   logit_i   = y_i . w + b
//   anomaly_i = logit_i > 0
// The model is trained with a sigmoid and binary cross-entropy, so
// sigmoid(logit) > 0.5, i.e. logit > 0, marks time step i as an outlier.
// Deciding on the sign instead of evaluating the sigmoid is this design's
// choice; the reference only says a linear layer gives the final prediction.
//
// One matmul_engine with a single output column does the products.
//
// Interface: pulse start while idle; y_enc, w and b must stay stable until
// done. done pulses once; logit and anomaly hold until the next start.
// Timing: done is high ROWS+1 cycles after start.
module classifier_head
  import tfm_pkg::*;
#(
  parameter int ROWS = WIN_LEN,
  parameter int D    = D_MODEL
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  fx_t             y_enc [ROWS][D],
  input  fx_t             w     [D],
  input  fx_t             b,
  output logic            busy,
  output logic            done,
  output fx_t             logit [ROWS],
  output logic [ROWS-1:0] anomaly
);

  fx_t wt [1][D];
  fx_t bias [1];
  fx_t c [ROWS][1];

  always_comb begin
    for (int i = 0; i < D; i++) wt[0][i] = w[i];
    bias[0] = b;
  end

  matmul_engine #(.M(ROWS), .K(D), .N(1)) u_mm (
    .clk, .rst_n, .start, .a(y_enc), .bt(wt), .bias,
    .busy, .done, .c);

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logit[r]   = c[r][0];
      anomaly[r] = (c[r][0] > 0);
    end
  end

endmodule
