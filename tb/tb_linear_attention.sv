// tb_linear_attention: random inputs and weights through linear_attention
// (4 rows, D = 3). The reference evaluates the same attention the slow way,
// sum_j sim(q_i,k_j) v_j / sum_j sim(q_i,k_j) with sim = phi(q).phi(k), so it
// is independent of the reordered product the RTL uses. Latency is checked.
module tb_linear_attention;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = 4, D = 3;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fx_t x [ROWS][D];
  fx_t wq [D][D];
  fx_t wk [D][D];
  fx_t wv [D][D];
  fx_t wo [D][D];
  fx_t bq [D];
  fx_t bk [D];
  fx_t bv [D];
  fx_t bo [D];
  fx_t y [ROWS][D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  linear_attention #(.ROWS(ROWS), .D(D)) dut (.*);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rand_w(output rmat_t wr, output rvec_t br, output fx_t w [D][D], output fx_t b [D]);
    for (int o = 0; o < D; o++) begin
      for (int i = 0; i < D; i++) begin wr[o][i] = rnd(-1.0, 1.0); w[o][i] = r2fx(wr[o][i]); end
      br[o] = rnd(-0.5, 0.5); b[o] = r2fx(br[o]);
    end
  endtask

  initial begin
    rmat_t xr, wqr, wkr, wvr, wo_r, yr;
    rvec_t bqr, bkr, bvr, bo_r;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < D; c++) x[r][c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int cycles;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) begin xr[r][c] = rnd(-2.0, 2.0); x[r][c] = r2fx(xr[r][c]); end
      rand_w(wqr, bqr, wq, bq);
      rand_w(wkr, bkr, wk, bk);
      rand_w(wvr, bvr, wv, bv);
      rand_w(wo_r, bo_r, wo, bo);
      yr = r_linattn(xr, ROWS, D, wqr, bqr, wkr, bkr, wvr, bvr, wo_r, bo_r);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != (ROWS*D+1) + (D*(D+1)+1) + (ROWS*(D+1)+1) + ROWS + (ROWS*D+1) + 4) begin
        failures++;
        $display("latency %0d, expected %0d", cycles, (ROWS*D+1) + (D*(D+1)+1) + (ROWS*(D+1)+1) + ROWS + (ROWS*D+1) + 4);
      end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) begin
          checks++;
          if (!close(fx2r(y[r][c]), yr[r][c], 3e-3, 3e-3)) begin
            failures++;
            $display("y[%0d][%0d] = %f, expected %f", r, c, fx2r(y[r][c]), yr[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
