// tb_matmul_engine: checks matmul_engine on the 3x4 by 4x3 product used as the
// running example for loop pipelining, with integer and fractional operands.
// Each result element is compared with a real-valued product, and the start
// to done latency must be M*N+1 cycles (II = 1, body latency 2).
module tb_matmul_engine;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int M = 3, K = 4, N = 3;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fx_t a [M][K];
  fx_t bt [N][K];
  fx_t bias [N];
  fx_t c [M][N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  matmul_engine #(.M(M), .K(K), .N(N)) dut (.*);

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input bit integer_ops);
    real ra [M][K];
    real rb [N][K];
    real rbias [N];
    int cycles;
    for (int i = 0; i < M; i++)
      for (int k = 0; k < K; k++) begin
        ra[i][k] = integer_ops ? real'($urandom_range(0, 20)) - 10.0 : rnd(-4.0, 4.0);
        a[i][k]  = r2fx(ra[i][k]);
      end
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < K; k++) begin
        rb[j][k] = integer_ops ? real'($urandom_range(0, 20)) - 10.0 : rnd(-4.0, 4.0);
        bt[j][k] = r2fx(rb[j][k]);
      end
      rbias[j] = integer_ops ? 0.0 : rnd(-2.0, 2.0);
      bias[j]  = r2fx(rbias[j]);
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != M*N + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cycles, M*N + 1);
    end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        real ref_v;
        ref_v = rbias[j];
        for (int k = 0; k < K; k++) ref_v += ra[i][k] * rb[j][k];
        checks++;
        if (!close(fx2r(c[i][j]), ref_v, integer_ops ? 0.0 : 1e-3, 0.0)) begin
          failures++;
          $display("c[%0d][%0d] = %f, expected %f", i, j, fx2r(c[i][j]), ref_v);
        end
      end
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("busy after done");
    end
  endtask

  initial begin
    for (int i = 0; i < M; i++) for (int k = 0; k < K; k++) a[i][k] = '0;
    for (int j = 0; j < N; j++) begin
      bias[j] = '0;
      for (int k = 0; k < K; k++) bt[j][k] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) run_case(1'b1);
    for (int t = 0; t < 6; t++) run_case(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
