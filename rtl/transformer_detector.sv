// transformer_detector: one complete outlier-detection model.
//
// A window of ROWS time steps with N_IN features each is embedded to width D
// by a linear layer, passed through N_LAYERS encoder layers and scored per
// time step by a linear classifier; anomaly[i] flags time step i as an
// outlier. LINEAR selects multi-head softmax attention (0) or linear attention
// (1) in every layer. There is no positional encoding and no layer
// normalisation, matching the models the reference evaluates.
//
// The parameters live in a param_regfile written through wr_*; word layout:
//   [0, D*N_IN)             embedding weights [D][N_IN]
//   [D*N_IN, D*N_IN+D)      embedding bias
//   then per layer l        layer_words(D, DFF) words, layout in tfm_pkg
//   last D+1 words          classifier weights [D] and bias
// The embedding and the sign-based decision are this design's reading of the
// "input embedding" box and the final linear layer of the reference.
//
// Interface: raise start for one cycle while busy is low; x_in is captured on
// that edge. done pulses once when logit and anomaly are valid; they hold until
// the next start. Weights must not be written while busy.
// Timing: done is high
//   1 + (ROWS*D+1) + N_LAYERS*(layer latency) + (N_LAYERS+1) + (ROWS+1)
// cycles after start (capture, embedding, layers, one cycle per hand-over,
// classifier); see encoder_layer for the layer latency. At the default sizes
// that is 1112 cycles with softmax attention and 562 with linear attention.
module transformer_detector
  import tfm_pkg::*;
#(
  parameter int ROWS     = WIN_LEN,
  parameter int N_FEAT   = N_IN,
  parameter int D        = D_MODEL,
  parameter int DFF      = D_FF,
  parameter int H        = N_HEADS,
  parameter int N_LAYERS = N_LAYERS_VANILLA,
  parameter bit LINEAR   = 1'b0,
  localparam int LW      = layer_words(D, DFF),
  localparam int N_WORDS = model_words(N_FEAT, D, DFF, N_LAYERS),
  localparam int AW      = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // parameter load
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  fx_t             wr_data,
  input  logic [AW-1:0]   rd_addr,
  output fx_t             rd_data,
  // inference
  input  logic            start,
  input  fx_t             x_in [ROWS][N_FEAT],
  output logic            busy,
  output logic            done,
  output fx_t             logit [ROWS],
  output logic [ROWS-1:0] anomaly
);

  localparam int EMB_B   = D * N_FEAT;
  localparam int LAYER0  = D * N_FEAT + D;
  localparam int CLS_W   = LAYER0 + N_LAYERS * LW;

  fx_t prm [N_WORDS];

  param_regfile #(.N_WORDS(N_WORDS)) u_params (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data, .q(prm));

  // Parameter views.
  fx_t emb_w [D][N_FEAT];
  fx_t emb_b [D];
  fx_t lay_w [N_LAYERS][LW];
  fx_t cls_w [D];
  fx_t cls_b;

  always_comb begin
    for (int o = 0; o < D; o++) begin
      for (int i = 0; i < N_FEAT; i++) emb_w[o][i] = prm[o*N_FEAT + i];
      emb_b[o] = prm[EMB_B + o];
      cls_w[o] = prm[CLS_W + o];
    end
    cls_b = prm[CLS_W + D];
    for (int l = 0; l < N_LAYERS; l++)
      for (int i = 0; i < LW; i++) lay_w[l][i] = prm[LAYER0 + l*LW + i];
  end

  // Input capture and start of the embedding.
  fx_t  x_q [ROWS][N_FEAT];
  logic emb_start, busy_q;
  logic cls_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      emb_start <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int i = 0; i < N_FEAT; i++) x_q[r][i] <= '0;
    end else begin
      emb_start <= 1'b0;
      if (start && !busy_q) begin
        busy_q    <= 1'b1;
        emb_start <= 1'b1;
        x_q       <= x_in;
      end else if (done) begin
        busy_q <= 1'b0;
      end
    end
  end

  // Embedding and encoder stack. Stage 0 is the embedding.
  fx_t  stage_y    [N_LAYERS+1][ROWS][D];
  logic stage_done [N_LAYERS+1];
  logic stage_busy [N_LAYERS+1];

  matmul_engine #(.M(ROWS), .K(N_FEAT), .N(D)) u_embed (
    .clk, .rst_n, .start(emb_start), .a(x_q), .bt(emb_w), .bias(emb_b),
    .busy(stage_busy[0]), .done(stage_done[0]), .c(stage_y[0]));

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    encoder_layer #(.ROWS(ROWS), .D(D), .DFF(DFF), .H(H), .LINEAR(LINEAR)) u_layer (
      .clk, .rst_n, .start(stage_done[l]), .x(stage_y[l]), .w(lay_w[l]),
      .busy(stage_busy[l+1]), .done(stage_done[l+1]), .y(stage_y[l+1]));
  end

  classifier_head #(.ROWS(ROWS), .D(D)) u_cls (
    .clk, .rst_n, .start(stage_done[N_LAYERS]), .y_enc(stage_y[N_LAYERS]),
    .w(cls_w), .b(cls_b), .busy(cls_busy), .done, .logit, .anomaly);

  assign busy = busy_q;

`ifndef SYNTHESIS
  a_no_write_while_busy : assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && busy_q))
    else $error("transformer_detector: parameter write during inference");
  a_busy_covers : assert property (@(posedge clk) disable iff (!rst_n)
      (stage_busy[0] || stage_busy[N_LAYERS] || cls_busy) |-> busy_q)
    else $error("transformer_detector: internal activity while idle");
`endif

endmodule
