// mh_attention: multi-head scaled dot-product self-attention over a window of
// ROWS time steps of width D, with H heads of width DK = D/H:
//   Q = X Wq^T + bq, K = X Wk^T + bk, V = X Wv^T + bv
//   O_h = softmax(Q_h K_h^T / sqrt(DK)) V_h        for each head h
//   Y = concat(O_0 .. O_{H-1}) Wo^T + bo
// The projections go to the full width D and are split into heads afterwards,
// as in the reference. No mask is applied (encoder self-attention).
//
// Dataflow: three projection engines in parallel -> H score engines in
// parallel -> H softmax units -> H (P V) engines -> output projection engine.
// Each step takes the previous step's done pulse as its start; all
// intermediate matrices stay in the engines' result registers.
//
// Interface: pulse start while idle; x and the weights must stay stable until
// done. done pulses once; y holds until the next start.
// Timing: done is high
//   (ROWS*D+1) + (ROWS*ROWS+1) + ROWS*(ROWS+3) + (ROWS*DK+1) + (ROWS*D+1) + 4
// cycles after start: the five step latencies plus one cycle per hand-over.
module mh_attention
  import tfm_pkg::*;
#(
  parameter int ROWS = WIN_LEN,
  parameter int D    = D_MODEL,
  parameter int H    = N_HEADS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  x  [ROWS][D],
  input  fx_t  wq [D][D],
  input  fx_t  bq [D],
  input  fx_t  wk [D][D],
  input  fx_t  bk [D],
  input  fx_t  wv [D][D],
  input  fx_t  bv [D],
  input  fx_t  wo [D][D],
  input  fx_t  bo [D],
  output logic busy,
  output logic done,
  output fx_t  y  [ROWS][D]
);

  localparam int  DK    = D / H;
  localparam fx_t SCALE = fx_inv_sqrt_const(DK);

  fx_t q [ROWS][D];
  fx_t k [ROWS][D];
  fx_t v [ROWS][D];
  fx_t o_cat [ROWS][D];
  fx_t zero_r [ROWS];
  fx_t zero_k [DK];

  logic proj_done, proj_k_done, proj_v_done;
  logic proj_busy [3];
  logic [H-1:0] score_done, smax_done, pv_done;
  logic [H-1:0] score_busy, smax_busy, pv_busy;
  logic out_busy;

  always_comb begin
    for (int i = 0; i < ROWS; i++) zero_r[i] = '0;
    for (int i = 0; i < DK; i++)   zero_k[i] = '0;
  end

  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_proj_q (
    .clk, .rst_n, .start, .a(x), .bt(wq), .bias(bq),
    .busy(proj_busy[0]), .done(proj_done), .c(q));
  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_proj_k (
    .clk, .rst_n, .start, .a(x), .bt(wk), .bias(bk),
    .busy(proj_busy[1]), .done(proj_k_done), .c(k));
  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_proj_v (
    .clk, .rst_n, .start, .a(x), .bt(wv), .bias(bv),
    .busy(proj_busy[2]), .done(proj_v_done), .c(v));

  for (genvar h = 0; h < H; h++) begin : g_head
    fx_t q_h  [ROWS][DK];
    fx_t k_h  [ROWS][DK];
    fx_t vt_h [DK][ROWS];
    fx_t s_h  [ROWS][ROWS];
    fx_t p_h  [ROWS][ROWS];
    fx_t o_h  [ROWS][DK];

    always_comb begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < DK; c++) begin
          q_h[r][c]  = q[r][h*DK + c];
          k_h[r][c]  = k[r][h*DK + c];
          vt_h[c][r] = v[r][h*DK + c];
        end
    end

    // Scores S_h = Q_h K_h^T (K_h is already the transposed operand).
    matmul_engine #(.M(ROWS), .K(DK), .N(ROWS)) u_score (
      .clk, .rst_n, .start(proj_done), .a(q_h), .bt(k_h), .bias(zero_r),
      .busy(score_busy[h]), .done(score_done[h]), .c(s_h));

    softmax_unit #(.ROWS(ROWS), .N(ROWS), .SCALE(SCALE)) u_softmax (
      .clk, .rst_n, .start(score_done[h]), .x(s_h),
      .busy(smax_busy[h]), .done(smax_done[h]), .p(p_h));

    matmul_engine #(.M(ROWS), .K(ROWS), .N(DK)) u_pv (
      .clk, .rst_n, .start(smax_done[h]), .a(p_h), .bt(vt_h), .bias(zero_k),
      .busy(pv_busy[h]), .done(pv_done[h]), .c(o_h));

    always_comb begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < DK; c++) o_cat[r][h*DK + c] = o_h[r][c];
    end
  end

  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_out (
    .clk, .rst_n, .start(pv_done[0]), .a(o_cat), .bt(wo), .bias(bo),
    .busy(out_busy), .done(done), .c(y));

  // The done pulses cover the one-cycle hand-over between steps.
  assign busy = proj_busy[0] || proj_busy[1] || proj_busy[2] || proj_done ||
                (|score_busy) || (|score_done) || (|smax_busy) || (|smax_done) ||
                (|pv_busy) || (|pv_done) || out_busy;

`ifndef SYNTHESIS
  // All heads and projections run in lock step.
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
      (proj_k_done == proj_done) && (proj_v_done == proj_done) &&
      (pv_done == {H{pv_done[0]}}))
    else $error("mh_attention: parallel engines out of step");
`endif

endmodule
