// linear_attention: kernelised self-attention with the feature map
// phi(x) = elu(x) + 1, computed in time linear in the window length:
//   Q = X Wq^T + bq, K = X Wk^T + bk, V = X Wv^T + bv
//   S = phi(K)^T V          (D x D)        z = sum_j phi(k_j)   (D)
//   a_i = phi(q_i)^T S / (phi(q_i) . z)
//   Y = A Wo^T + bo
// phi(K)^T V and z are formed once and shared by all queries, which is the
// point of linear attention: no ROWS x ROWS score matrix and no softmax.
//
// Dataflow: three projection engines in parallel; phi is applied to Q and K
// by two fully unrolled elu_feature_map blocks; one engine computes
// phi(K)^T [V | 1], whose last column is z; a second computes
// phi(Q) [S | z], whose last column is the per-row denominator; a divide
// stage normalises one row per cycle (D dividers); the output projection
// follows. Single head (the reference's linear model lists no head count).
// Appending a column of ones to fold z into the same products is this
// design's choice.
//
// Interface: pulse start while idle; x and the weights must stay stable until
// done. done pulses once; y holds until the next start.
// Timing: done is high
//   (ROWS*D+1) + (D*(D+1)+1) + (ROWS*(D+1)+1) + ROWS + (ROWS*D+1) + 4
// cycles after start: the five step latencies plus one cycle per hand-over.
module linear_attention
  import tfm_pkg::*;
#(
  parameter int ROWS = WIN_LEN,
  parameter int D    = D_MODEL
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

  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;

  fx_t q [ROWS][D];
  fx_t k [ROWS][D];
  fx_t v [ROWS][D];
  fx_t phi_q [ROWS][D];
  fx_t phi_k [ROWS][D];
  fx_t phi_kt [D][ROWS];       // phi(K)^T
  fx_t v1_t [D+1][ROWS];       // [V | 1]^T
  fx_t s_z [D][D+1];           // [S | z]
  fx_t s_z_t [D+1][D];
  fx_t num [ROWS][D+1];        // [phi(Q) S | phi(Q) z]
  fx_t att [ROWS][D];
  fx_t zero_d1 [D+1];

  logic proj_done, proj_k_done, proj_v_done, kv_done, num_done, norm_done;
  logic proj_busy [3];
  logic kv_busy, num_busy, out_busy;
  logic norm_active;
  logic [RW-1:0] norm_r;

  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_proj_q (
    .clk, .rst_n, .start, .a(x), .bt(wq), .bias(bq),
    .busy(proj_busy[0]), .done(proj_done), .c(q));
  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_proj_k (
    .clk, .rst_n, .start, .a(x), .bt(wk), .bias(bk),
    .busy(proj_busy[1]), .done(proj_k_done), .c(k));
  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_proj_v (
    .clk, .rst_n, .start, .a(x), .bt(wv), .bias(bv),
    .busy(proj_busy[2]), .done(proj_v_done), .c(v));

  elu_feature_map #(.ROWS(ROWS), .COLS(D)) u_phi_q (.x(q), .y(phi_q));
  elu_feature_map #(.ROWS(ROWS), .COLS(D)) u_phi_k (.x(k), .y(phi_k));

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < D; c++) begin
        phi_kt[c][r] = phi_k[r][c];
        v1_t[c][r]   = v[r][c];
      end
      v1_t[D][r] = FX_ONE;
    end
    for (int a = 0; a < D; a++)
      for (int b = 0; b <= D; b++) s_z_t[b][a] = s_z[a][b];
    for (int b = 0; b <= D; b++) zero_d1[b] = '0;
  end

  matmul_engine #(.M(D), .K(ROWS), .N(D+1)) u_kv (
    .clk, .rst_n, .start(proj_done), .a(phi_kt), .bt(v1_t), .bias(zero_d1),
    .busy(kv_busy), .done(kv_done), .c(s_z));

  matmul_engine #(.M(ROWS), .K(D), .N(D+1)) u_num (
    .clk, .rst_n, .start(kv_done), .a(phi_q), .bt(s_z_t), .bias(zero_d1),
    .busy(num_busy), .done(num_done), .c(num));

  // Normalisation: one row per cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      norm_active <= 1'b0;
      norm_r      <= '0;
      norm_done   <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) att[r][c] <= '0;
    end else begin
      norm_done <= 1'b0;
      if (num_done) begin
        norm_active <= 1'b1;
        norm_r      <= '0;
      end else if (norm_active) begin
        for (int c = 0; c < D; c++) att[norm_r][c] <= fx_div(num[norm_r][c], num[norm_r][D]);
        if (int'(norm_r) == ROWS - 1) begin
          norm_active <= 1'b0;
          norm_done   <= 1'b1;
        end else begin
          norm_r <= norm_r + 1'b1;
        end
      end
    end
  end

  matmul_engine #(.M(ROWS), .K(D), .N(D)) u_out (
    .clk, .rst_n, .start(norm_done), .a(att), .bt(wo), .bias(bo),
    .busy(out_busy), .done(done), .c(y));

  // The done pulses cover the one-cycle hand-over between steps.
  assign busy = proj_busy[0] || proj_busy[1] || proj_busy[2] || proj_done ||
                kv_busy || kv_done || num_busy || num_done ||
                norm_active || norm_done || out_busy;

`ifndef SYNTHESIS
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
      (proj_k_done == proj_done) && (proj_v_done == proj_done))
    else $error("linear_attention: projection engines out of step");
`endif

endmodule
