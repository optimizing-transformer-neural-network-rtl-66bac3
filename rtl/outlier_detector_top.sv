// outlier_detector_top: the two transformer outlier detectors side by side.
//
//  * vanilla model: 2 encoder layers with 2-head softmax attention
//  * linear model:  1 encoder layer with linear (elu+1 kernel) attention
// Both take a window of WIN_LEN time steps, have a 16-wide feed-forward layer
// and an embedding width of D_MODEL, and report one anomaly decision per time
// step. The two are independent: each has its own parameter-load port, start,
// busy and done, and can run at the same time as the other.
//
// Interface and timing: see transformer_detector. With the default sizes the
// vanilla model finishes 1112 cycles and the linear model 562 cycles after its
// start.
module outlier_detector_top
  import tfm_pkg::*;
#(
  parameter int ROWS   = WIN_LEN,
  parameter int N_FEAT = N_IN,
  parameter int D      = D_MODEL,
  parameter int DFF    = D_FF,
  localparam int VW    = model_words(N_FEAT, D, DFF, N_LAYERS_VANILLA),
  localparam int LWD   = model_words(N_FEAT, D, DFF, N_LAYERS_LINEAR),
  localparam int VAW   = (VW > 1) ? $clog2(VW) : 1,
  localparam int LAW   = (LWD > 1) ? $clog2(LWD) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // vanilla transformer detector
  input  logic            van_wr_en,
  input  logic [VAW-1:0]  van_wr_addr,
  input  fx_t             van_wr_data,
  input  logic [VAW-1:0]  van_rd_addr,
  output fx_t             van_rd_data,
  input  logic            van_start,
  input  fx_t             van_x [ROWS][N_FEAT],
  output logic            van_busy,
  output logic            van_done,
  output fx_t             van_logit [ROWS],
  output logic [ROWS-1:0] van_anomaly,
  // linear transformer detector
  input  logic            lin_wr_en,
  input  logic [LAW-1:0]  lin_wr_addr,
  input  fx_t             lin_wr_data,
  input  logic [LAW-1:0]  lin_rd_addr,
  output fx_t             lin_rd_data,
  input  logic            lin_start,
  input  fx_t             lin_x [ROWS][N_FEAT],
  output logic            lin_busy,
  output logic            lin_done,
  output fx_t             lin_logit [ROWS],
  output logic [ROWS-1:0] lin_anomaly
);

  transformer_detector #(
    .ROWS(ROWS), .N_FEAT(N_FEAT), .D(D), .DFF(DFF), .H(N_HEADS),
    .N_LAYERS(N_LAYERS_VANILLA), .LINEAR(1'b0)
  ) u_vanilla (
    .clk, .rst_n,
    .wr_en(van_wr_en), .wr_addr(van_wr_addr), .wr_data(van_wr_data),
    .rd_addr(van_rd_addr), .rd_data(van_rd_data),
    .start(van_start), .x_in(van_x), .busy(van_busy), .done(van_done),
    .logit(van_logit), .anomaly(van_anomaly));

  transformer_detector #(
    .ROWS(ROWS), .N_FEAT(N_FEAT), .D(D), .DFF(DFF), .H(1),
    .N_LAYERS(N_LAYERS_LINEAR), .LINEAR(1'b1)
  ) u_linear (
    .clk, .rst_n,
    .wr_en(lin_wr_en), .wr_addr(lin_wr_addr), .wr_data(lin_wr_data),
    .rd_addr(lin_rd_addr), .rd_data(lin_rd_data),
    .start(lin_start), .x_in(lin_x), .busy(lin_busy), .done(lin_done),
    .logit(lin_logit), .anomaly(lin_anomaly));

endmodule
