// tb_classifier_head: random encoder outputs and weights through
// classifier_head (8 rows, D = 4). Each logit is compared with y.w + b in reals,
// each flag with logit > 0, both decisions must occur, and the latency must be
// ROWS+1 cycles.
module tb_classifier_head;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = 8, D = 4;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fx_t y_enc [ROWS][D];
  fx_t w [D];
  fx_t b;
  fx_t logit [ROWS];
  logic [ROWS-1:0] anomaly;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  always #5 clk = ~clk;

  classifier_head #(.ROWS(ROWS), .D(D)) dut (.*);

  initial begin
    #500000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real yr [ROWS][D];
    real wr [D];
    real br;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < D; c++) y_enc[r][c] = '0;
    for (int c = 0; c < D; c++) w[c] = '0;
    b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      int cycles;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) begin yr[r][c] = rnd(-3.0, 3.0); y_enc[r][c] = r2fx(yr[r][c]); end
      for (int c = 0; c < D; c++) begin wr[c] = rnd(-1.0, 1.0); w[c] = r2fx(wr[c]); end
      br = rnd(-1.0, 1.0); b = r2fx(br);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != ROWS + 1) begin
        failures++;
        $display("latency %0d", cycles);
      end
      for (int r = 0; r < ROWS; r++) begin
        real e;
        e = br;
        for (int c = 0; c < D; c++) e += yr[r][c] * wr[c];
        checks += 2;
        if (!close(fx2r(logit[r]), e, 1e-3, 0.0)) begin
          failures++;
          $display("logit[%0d] = %f, expected %f", r, fx2r(logit[r]), e);
        end
        if (anomaly[r] != (logit[r] > 0)) begin
          failures++;
          $display("anomaly[%0d] wrong", r);
        end
        if (e > 1e-3) n_pos++;
        if (e < -1e-3) n_neg++;
        if (e > 1e-3 && !anomaly[r]) begin failures++; $display("missed outlier %0d", r); end
        if (e < -1e-3 && anomaly[r]) begin failures++; $display("false outlier %0d", r); end
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
