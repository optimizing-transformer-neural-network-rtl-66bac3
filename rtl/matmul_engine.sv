// matmul_engine: C = A * B + bias, with one result element per clock.
//
// This is the matrix-multiply scheme the reference uses throughout the model:
// the loop over output columns is pipelined with an initiation interval of 1
// and the inner dot-product loop is fully unrolled, so all K multiplies of one
// element run in parallel. To feed them, A is held partitioned along its
// columns and B along its rows (here: whole arrays on ports).
//
// B is supplied transposed (bt[n][k] = B[k][n]); weight matrices stored
// [out][in] can then be wired in directly and a product with a transpose
// (Q * K^T) needs no extra reordering. bias[n] is added to column n.
//
// Pipeline: issue (element index i,j) -> stage 1 registers the K products at
// full width -> stage 2 adds them and the bias, rescales, saturates and writes
// C[i][j]. Elements are issued row-major, one per cycle.
//
// Interface: pulse start for one cycle while idle. a, bt and bias must stay
// stable until done. done pulses for one cycle together with the write of the
// last element; c then holds the full result until the next start.
// Timing: done is high M*N+1 cycles after the start edge, which is
// II*(trip count - 1) + body latency with II = 1, trip count = M*N and a body
// latency of 2 cycles.
module matmul_engine
  import tfm_pkg::*;
#(
  parameter int M = 3,
  parameter int K = 4,
  parameter int N = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  a    [M][K],
  input  fx_t  bt   [N][K],
  input  fx_t  bias [N],
  output logic busy,
  output logic done,
  output fx_t  c    [M][N]
);

  localparam int IW = (M > 1) ? $clog2(M) : 1;
  localparam int JW = (N > 1) ? $clog2(N) : 1;

  // Issue stage.
  logic          issuing;
  logic [IW-1:0] i_q;
  logic [JW-1:0] j_q;

  // Stage 1: products.
  logic          s1_valid, s1_last;
  logic [IW-1:0] s1_i;
  logic [JW-1:0] s1_j;
  fx_wide_t      s1_prod [K];

  wire issue_last = (int'(i_q) == M - 1) && (int'(j_q) == N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      i_q     <= '0;
      j_q     <= '0;
    end else if (start && !busy) begin
      issuing <= 1'b1;
      i_q     <= '0;
      j_q     <= '0;
    end else if (issuing) begin
      if (issue_last) begin
        issuing <= 1'b0;
      end else if (int'(j_q) == N - 1) begin
        j_q <= '0;
        i_q <= i_q + 1'b1;
      end else begin
        j_q <= j_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_i     <= '0;
      s1_j     <= '0;
      for (int k = 0; k < K; k++) s1_prod[k] <= '0;
    end else begin
      s1_valid <= issuing;
      s1_last  <= issuing && issue_last;
      s1_i     <= i_q;
      s1_j     <= j_q;
      for (int k = 0; k < K; k++)
        s1_prod[k] <= fx_wide_t'(a[i_q][k]) * fx_wide_t'(bt[j_q][k]);
    end
  end

  // Stage 2: adder tree (written as a sum; synthesis balances it), bias, write.
  fx_wide_t s2_sum;
  always_comb begin
    s2_sum = fx_wide_t'(bias[s1_j]) <<< FX_FRAC;
    for (int k = 0; k < K; k++) s2_sum = s2_sum + s1_prod[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) c[i][j] <= '0;
    end else begin
      done <= s1_valid && s1_last;
      if (s1_valid) c[s1_i][s1_j] <= fx_sat(s2_sum >>> FX_FRAC);
    end
  end

  assign busy = issuing || s1_valid;

`ifndef SYNTHESIS
  a_no_restart : assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("matmul_engine: start while busy");
`endif

endmodule
