// tb_relu_array: random matrices through relu_array; every element must be
// max(0, x), including zero, the most negative and the most positive value.
module tb_relu_array;
  import tfm_pkg::*;

  localparam int ROWS = 3, COLS = 5;
  fx_t x [ROWS][COLS];
  fx_t y [ROWS][COLS];
  int checks = 0, failures = 0;

  relu_array #(.ROWS(ROWS), .COLS(COLS)) dut (.x, .y);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) x[r][c] = fx_t'($urandom);
      if (t == 0) begin
        x[0][0] = '0; x[0][1] = FX_MIN; x[0][2] = FX_MAX; x[0][3] = -1; x[0][4] = 1;
      end
      #1;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          fx_t e;
          e = (x[r][c][FX_W-1]) ? fx_t'(0) : x[r][c];
          checks++;
          if (y[r][c] != e) begin
            failures++;
            $display("relu(%0d) = %0d", x[r][c], y[r][c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
