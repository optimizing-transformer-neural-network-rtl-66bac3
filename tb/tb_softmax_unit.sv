// tb_softmax_unit: random score matrices (including rows with large values
// that would overflow e^x without the max shift) through softmax_unit with a
// scale of 1/2. Each probability is compared with the exact softmax, every
// row must sum to 1, and the latency must be ROWS*(N+3) cycles.
module tb_softmax_unit;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = 3, N = 5;
  localparam fx_t SCALE = fx_t'(1 << (FX_FRAC - 1));

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fx_t x [ROWS][N];
  fx_t p [ROWS][N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  softmax_unit #(.ROWS(ROWS), .N(N), .SCALE(SCALE)) dut (.*);

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int j = 0; j < N; j++) x[r][j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      rmat_t xr, pr;
      int cycles;
      for (int r = 0; r < ROWS; r++)
        for (int j = 0; j < N; j++) begin
          // Row 2 of odd cases sits far above zero: e^x alone would overflow.
          xr[r][j] = (r == 2 && t % 2 == 1) ? rnd(60.0, 70.0) : rnd(-6.0, 6.0);
          x[r][j]  = r2fx(xr[r][j]);
        end
      pr = r_softmax(xr, ROWS, N, 0.5);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != ROWS * (N + 3)) begin
        failures++;
        $display("latency %0d, expected %0d", cycles, ROWS * (N + 3));
      end
      for (int r = 0; r < ROWS; r++) begin
        real s;
        s = 0.0;
        for (int j = 0; j < N; j++) begin
          s += fx2r(p[r][j]);
          checks++;
          if (!close(fx2r(p[r][j]), pr[r][j], 2e-4, 1e-3)) begin
            failures++;
            $display("p[%0d][%0d] = %f, expected %f", r, j, fx2r(p[r][j]), pr[r][j]);
          end
        end
        checks++;
        if (!close(s, 1.0, 1e-3, 0.0)) begin
          failures++;
          $display("row %0d sums to %f", r, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
