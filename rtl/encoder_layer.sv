// encoder_layer: one transformer encoder layer,
//   R = X + Attention(X)
//   Y = R + FFN(R)
// The attention is multi-head scaled dot-product (LINEAR = 0) or linear
// attention with the elu+1 feature map (LINEAR = 1). Layer normalisation after
// each residual add is the identity, as in the evaluated models, which run with
// it disabled; positional encoding is likewise absent.
//
// All weights of the layer arrive as one flat word array w, laid out as
// documented in tfm_pkg (Wq bq Wk bk Wv bv Wo bo W1 b1 W2 b2, matrices
// [out][in]). The residual adds saturate.
//
// Interface: pulse start while idle; x and w must stay stable until done. done
// pulses once; y holds until the next start.
// Timing: done is high (attention latency) + 1 + (feed-forward latency) + 1
// cycles after start (one hand-over cycle, one cycle for the output register);
// see mh_attention, linear_attention and feed_forward.
module encoder_layer
  import tfm_pkg::*;
#(
  parameter int ROWS   = WIN_LEN,
  parameter int D      = D_MODEL,
  parameter int DFF    = D_FF,
  parameter int H      = N_HEADS,
  parameter bit LINEAR = 1'b0,
  localparam int LW    = layer_words(D, DFF)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  x [ROWS][D],
  input  fx_t  w [LW],
  output logic busy,
  output logic done,
  output fx_t  y [ROWS][D]
);

  fx_t wq [D][D];
  fx_t wk [D][D];
  fx_t wv [D][D];
  fx_t wo [D][D];
  fx_t bq [D];
  fx_t bk [D];
  fx_t bv [D];
  fx_t bo [D];
  fx_t w1 [DFF][D];
  fx_t b1 [DFF];
  fx_t w2 [D][DFF];
  fx_t b2 [D];

  always_comb begin
    for (int o = 0; o < D; o++) begin
      for (int i = 0; i < D; i++) begin
        wq[o][i] = w[off_wq()  + o*D + i];
        wk[o][i] = w[off_wk(D) + o*D + i];
        wv[o][i] = w[off_wv(D) + o*D + i];
        wo[o][i] = w[off_wo(D) + o*D + i];
      end
      bq[o] = w[off_bq(D) + o];
      bk[o] = w[off_bk(D) + o];
      bv[o] = w[off_bv(D) + o];
      bo[o] = w[off_bo(D) + o];
      for (int i = 0; i < DFF; i++) w2[o][i] = w[off_w2(D, DFF) + o*DFF + i];
      b2[o] = w[off_b2(D, DFF) + o];
    end
    for (int o = 0; o < DFF; o++) begin
      for (int i = 0; i < D; i++) w1[o][i] = w[off_w1(D) + o*D + i];
      b1[o] = w[off_b1(D, DFF) + o];
    end
  end

  fx_t  attn [ROWS][D];
  fx_t  res1 [ROWS][D];
  fx_t  ffn  [ROWS][D];
  logic attn_busy, attn_done, ffn_busy, ffn_done;

  if (LINEAR) begin : g_linear
    linear_attention #(.ROWS(ROWS), .D(D)) u_attn (
      .clk, .rst_n, .start, .x,
      .wq, .bq, .wk, .bk, .wv, .bv, .wo, .bo,
      .busy(attn_busy), .done(attn_done), .y(attn));
  end else begin : g_vanilla
    mh_attention #(.ROWS(ROWS), .D(D), .H(H)) u_attn (
      .clk, .rst_n, .start, .x,
      .wq, .bq, .wk, .bk, .wv, .bv, .wo, .bo,
      .busy(attn_busy), .done(attn_done), .y(attn));
  end

  // First residual connection (normalisation = identity).
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < D; c++) res1[r][c] = fx_add(x[r][c], attn[r][c]);
  end

  feed_forward #(.ROWS(ROWS), .D(D), .DFF(DFF)) u_ffn (
    .clk, .rst_n, .start(attn_done), .x(res1),
    .w1, .b1, .w2, .b2,
    .busy(ffn_busy), .done(ffn_done), .y(ffn));

  // Second residual connection, registered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) y[r][c] <= '0;
    end else begin
      done <= ffn_done;
      if (ffn_done)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < D; c++) y[r][c] <= fx_add(res1[r][c], ffn[r][c]);
    end
  end

  assign busy = attn_busy || attn_done || ffn_busy || ffn_done;

endmodule
