// tb_elu_feature_map: random matrices spanning negative and positive values
// through elu_feature_map; each element must equal elu(x)+1 (x+1 above zero,
// e^x at or below), and must be positive.
module tb_elu_feature_map;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = 2, COLS = 4;
  fx_t x [ROWS][COLS];
  fx_t y [ROWS][COLS];
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  elu_feature_map #(.ROWS(ROWS), .COLS(COLS)) dut (.x, .y);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) x[r][c] = r2fx(rnd(-8.0, 6.0));
      #1;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          real e;
          e = r_phi(fx2r(x[r][c]));
          if (x[r][c] > 0) n_pos++; else n_neg++;
          checks++;
          if (!close(fx2r(y[r][c]), e, 3e-5, 3e-4) || (y[r][c] < 0)) begin
            failures++;
            $display("phi(%f) = %f, expected %f", fx2r(x[r][c]), fx2r(y[r][c]), e);
          end
        end
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
