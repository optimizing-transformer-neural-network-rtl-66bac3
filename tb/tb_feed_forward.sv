// tb_feed_forward: random inputs and weights through feed_forward (4 rows,
// D = 3, DFF = 6). Output compared with W2 ReLU(W1 x + b1) + b2 in reals; the
// test also confirms that ReLU actually clipped some hidden values and that
// the latency is (ROWS*DFF+1) + (ROWS*D+1) cycles.
module tb_feed_forward;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = 4, D = 3, DFF = 6;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fx_t x [ROWS][D];
  fx_t w1 [DFF][D];
  fx_t b1 [DFF];
  fx_t w2 [D][DFF];
  fx_t b2 [D];
  fx_t y [ROWS][D];
  int checks = 0, failures = 0, clipped = 0;

  always #5 clk = ~clk;

  feed_forward #(.ROWS(ROWS), .D(D), .DFF(DFF)) dut (.*);

  initial begin
    #500000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rmat_t xr, w1r, w2r, yr;
    rvec_t b1r, b2r;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < D; c++) x[r][c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int cycles;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) begin xr[r][c] = rnd(-2.0, 2.0); x[r][c] = r2fx(xr[r][c]); end
      for (int o = 0; o < DFF; o++) begin
        for (int i = 0; i < D; i++) begin w1r[o][i] = rnd(-1.0, 1.0); w1[o][i] = r2fx(w1r[o][i]); end
        b1r[o] = rnd(-0.5, 0.5); b1[o] = r2fx(b1r[o]);
      end
      for (int o = 0; o < D; o++) begin
        for (int i = 0; i < DFF; i++) begin w2r[o][i] = rnd(-1.0, 1.0); w2[o][i] = r2fx(w2r[o][i]); end
        b2r[o] = rnd(-0.5, 0.5); b2[o] = r2fx(b2r[o]);
      end
      yr = r_ffn(xr, ROWS, D, DFF, w1r, b1r, w2r, b2r);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != (ROWS*DFF + 1) + 1 + (ROWS*D + 1)) begin
        failures++;
        $display("latency %0d", cycles);
      end
      for (int r = 0; r < ROWS; r++)
        for (int o = 0; o < DFF; o++) if (dut.h[r][o] < 0) clipped++;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) begin
          checks++;
          if (!close(fx2r(y[r][c]), yr[r][c], 1e-3, 1e-3)) begin
            failures++;
            $display("y[%0d][%0d] = %f, expected %f", r, c, fx2r(y[r][c]), yr[r][c]);
          end
        end
    end
    checks++;
    if (clipped == 0) begin
      failures++;
      $display("ReLU never clipped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
