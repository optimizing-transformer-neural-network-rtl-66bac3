// softmax_unit: row-wise softmax of a ROWS x N score matrix, with the scores
// first multiplied by SCALE (1/sqrt(d_k) in scaled dot-product attention).
//
// For numerical safety every row is shifted by its maximum before
// exponentiation, softmax(x) = softmax(x - max(x)), so each exponent is <= 0,
// the largest term is exactly 1 and the row sum stays between 1 and N. This
// max subtraction is the reference's; the rest of the schedule is this
// design's choice.
//
// Per row: MAX (1 cycle, maximum over the scaled row, all elements at once),
// EXP (N cycles, one exp_unit, one element per cycle, running sum),
// DIV (1 cycle, reciprocal of the sum), NORM (1 cycle, all N elements
// multiplied by the reciprocal and written to p).
//
// Interface: pulse start while idle; x must stay stable until done. done pulses
// once when the whole matrix is written; p holds until the next start.
// Timing: done is high ROWS*(N+3) cycles after the start edge.
module softmax_unit
  import tfm_pkg::*;
#(
  parameter int  ROWS  = WIN_LEN,
  parameter int  N     = WIN_LEN,
  parameter fx_t SCALE = FX_ONE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  x [ROWS][N],
  output logic busy,
  output logic done,
  output fx_t  p [ROWS][N]
);

  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int CW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [2:0] {S_IDLE, S_MAX, S_EXP, S_DIV, S_NORM} state_t;
  state_t state;

  logic [RW-1:0] r_q;
  logic [CW-1:0] j_q;
  fx_t           mx_q, sum_q, recip_q;
  fx_t           e_buf [N];

  // Scaled current row and its maximum.
  fx_t xs [N];
  fx_t row_max;
  always_comb begin
    for (int j = 0; j < N; j++) xs[j] = fx_mul(x[r_q][j], SCALE);
    row_max = xs[0];
    for (int j = 1; j < N; j++)
      if (xs[j] > row_max) row_max = xs[j];
  end

  fx_t e_val;
  exp_unit u_exp (.x(xs[j_q] - mx_q), .y(e_val));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      r_q     <= '0;
      j_q     <= '0;
      mx_q    <= '0;
      sum_q   <= '0;
      recip_q <= '0;
      done    <= 1'b0;
      for (int j = 0; j < N; j++) e_buf[j] <= '0;
      for (int r = 0; r < ROWS; r++)
        for (int j = 0; j < N; j++) p[r][j] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r_q   <= '0;
          state <= S_MAX;
        end
        S_MAX: begin
          mx_q  <= row_max;
          sum_q <= '0;
          j_q   <= '0;
          state <= S_EXP;
        end
        S_EXP: begin
          e_buf[j_q] <= e_val;
          sum_q      <= sum_q + e_val;
          if (int'(j_q) == N - 1) state <= S_DIV;
          else                    j_q   <= j_q + 1'b1;
        end
        S_DIV: begin
          recip_q <= fx_div(FX_ONE, sum_q);
          state   <= S_NORM;
        end
        S_NORM: begin
          for (int j = 0; j < N; j++) p[r_q][j] <= fx_mul(e_buf[j], recip_q);
          if (int'(r_q) == ROWS - 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            r_q   <= r_q + 1'b1;
            state <= S_MAX;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

`ifndef SYNTHESIS
  a_no_restart : assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("softmax_unit: start while busy");
`endif

endmodule
