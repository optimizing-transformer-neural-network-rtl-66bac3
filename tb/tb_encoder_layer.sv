// tb_encoder_layer: two encoder_layer instances, one with multi-head softmax
// attention and one with linear attention (4 rows, D = 4, DFF = 6, 2 heads),
// fed the same random input and each its own random flat weight array. Outputs
// are compared with X + Attn(X) followed by R + FFN(R) in reals, and each
// latency with (attention) + 1 + (feed-forward) + 1 cycles.
module tb_encoder_layer;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = 4, D = 4, DFF = 6, H = 2, DK = D / H;
  localparam int LW = layer_words(D, DFF);
  localparam int FFN_LAT = (ROWS*DFF + 1) + 1 + (ROWS*D + 1);
  localparam int MHA_LAT = (ROWS*D+1) + (ROWS*ROWS+1) + ROWS*(ROWS+3) + (ROWS*DK+1) + (ROWS*D+1) + 4;
  localparam int LIN_LAT = (ROWS*D+1) + (D*(D+1)+1) + (ROWS*(D+1)+1) + ROWS + (ROWS*D+1) + 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy_v, done_v, busy_l, done_l;
  fx_t x [ROWS][D];
  fx_t w_v [LW];
  fx_t w_l [LW];
  fx_t y_v [ROWS][D];
  fx_t y_l [ROWS][D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  encoder_layer #(.ROWS(ROWS), .D(D), .DFF(DFF), .H(H), .LINEAR(1'b0)) dut_v (
    .clk, .rst_n, .start, .x, .w(w_v), .busy(busy_v), .done(done_v), .y(y_v));
  encoder_layer #(.ROWS(ROWS), .D(D), .DFF(DFF), .H(H), .LINEAR(1'b1)) dut_l (
    .clk, .rst_n, .start, .x, .w(w_l), .busy(busy_l), .done(done_l), .y(y_l));

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rmat_t xr, yv_r, yl_r;
    real wv_r [];
    real wl_r [];
    wv_r = new[LW];
    wl_r = new[LW];
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < D; c++) x[r][c] = '0;
    for (int i = 0; i < LW; i++) begin w_v[i] = '0; w_l[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int cycles, lat_v, lat_l;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) begin xr[r][c] = rnd(-1.0, 1.0); x[r][c] = r2fx(xr[r][c]); end
      for (int i = 0; i < LW; i++) begin
        wv_r[i] = rnd(-0.6, 0.6); w_v[i] = r2fx(wv_r[i]);
        wl_r[i] = rnd(-0.6, 0.6); w_l[i] = r2fx(wl_r[i]);
      end
      yv_r = r_layer(xr, ROWS, D, DFF, H, 1'b0, wv_r, 0);
      yl_r = r_layer(xr, ROWS, D, DFF, H, 1'b1, wl_r, 0);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0; lat_v = 0; lat_l = 0;
      while (lat_v == 0 || lat_l == 0) begin
        @(negedge clk);
        cycles++;
        if (done_v) lat_v = cycles;
        if (done_l) lat_l = cycles;
        if (cycles > 2000) break;
      end
      checks += 2;
      if (lat_v != MHA_LAT + 1 + FFN_LAT + 1) begin failures++; $display("vanilla latency %0d", lat_v); end
      if (lat_l != LIN_LAT + 1 + FFN_LAT + 1) begin failures++; $display("linear latency %0d", lat_l); end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < D; c++) begin
          checks += 2;
          if (!close(fx2r(y_v[r][c]), yv_r[r][c], 3e-3, 3e-3)) begin
            failures++;
            $display("vanilla y[%0d][%0d] = %f, expected %f", r, c, fx2r(y_v[r][c]), yv_r[r][c]);
          end
          if (!close(fx2r(y_l[r][c]), yl_r[r][c], 3e-3, 3e-3)) begin
            failures++;
            $display("linear y[%0d][%0d] = %f, expected %f", r, c, fx2r(y_l[r][c]), yl_r[r][c]);
          end
        end
      @(negedge clk);
      checks++;
      if (busy_v || busy_l) begin failures++; $display("busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
