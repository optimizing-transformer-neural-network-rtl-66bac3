// tb_transformer_detector: two reduced-size detectors (4 time steps, 2
// features, D = 4, DFF = 6): a 2-layer model with 2-head softmax attention and
// a 1-layer model with linear attention. Each is loaded with random
// parameters through its write port (and read back), then runs several
// windows. Logits are compared with the real-valued model, flags with the sign
// of the reference logit where it is clear of zero, and the latency with
//   1 + (ROWS*D+1) + N_LAYERS*(layer latency) + (N_LAYERS+1) + (ROWS+1).
module tb_transformer_detector;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = 4, NF = 2, D = 4, DFF = 6, H = 2;
  localparam int NV = 2, NL = 1;
  localparam int WV = model_words(NF, D, DFF, NV);
  localparam int WL = model_words(NF, D, DFF, NL);
  localparam int AV = $clog2(WV), AL = $clog2(WL);
  localparam int FFN_LAT = (ROWS*DFF + 1) + 1 + (ROWS*D + 1);
  localparam int MHA_LAT = (ROWS*D+1) + (ROWS*ROWS+1) + ROWS*(ROWS+3) + (ROWS*(D/H)+1) + (ROWS*D+1) + 4;
  localparam int LIN_LAT = (ROWS*D+1) + (D*(D+1)+1) + (ROWS*(D+1)+1) + ROWS + (ROWS*D+1) + 4;
  localparam int VLAT = 1 + (ROWS*D+1) + NV*(MHA_LAT + FFN_LAT + 2) + (NV+1) + (ROWS+1);
  localparam int LLAT = 1 + (ROWS*D+1) + NL*(LIN_LAT + FFN_LAT + 2) + (NL+1) + (ROWS+1);

  logic clk = 0, rst_n = 0;
  logic v_wr_en = 0, l_wr_en = 0, v_start = 0, l_start = 0;
  logic [AV-1:0] v_wr_addr = '0, v_rd_addr = '0;
  logic [AL-1:0] l_wr_addr = '0, l_rd_addr = '0;
  fx_t v_wr_data = '0, l_wr_data = '0, v_rd_data, l_rd_data;
  fx_t x_in [ROWS][NF];
  logic v_busy, v_done, l_busy, l_done;
  fx_t v_logit [ROWS];
  fx_t l_logit [ROWS];
  logic [ROWS-1:0] v_anom, l_anom;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  transformer_detector #(.ROWS(ROWS), .N_FEAT(NF), .D(D), .DFF(DFF), .H(H), .N_LAYERS(NV), .LINEAR(1'b0)) dut_v (
    .clk, .rst_n, .wr_en(v_wr_en), .wr_addr(v_wr_addr), .wr_data(v_wr_data), .rd_addr(v_rd_addr),
    .rd_data(v_rd_data), .start(v_start), .x_in, .busy(v_busy), .done(v_done), .logit(v_logit), .anomaly(v_anom));
  transformer_detector #(.ROWS(ROWS), .N_FEAT(NF), .D(D), .DFF(DFF), .H(1), .N_LAYERS(NL), .LINEAR(1'b1)) dut_l (
    .clk, .rst_n, .wr_en(l_wr_en), .wr_addr(l_wr_addr), .wr_data(l_wr_data), .rd_addr(l_rd_addr),
    .rd_data(l_rd_data), .start(l_start), .x_in, .busy(l_busy), .done(l_done), .logit(l_logit), .anomaly(l_anom));

  initial begin
    #2000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real wv [];
  real wl [];

  initial begin
    rmat_t xr, rv, rl;
    wv = new[WV];
    wl = new[WL];
    for (int r = 0; r < ROWS; r++) for (int f = 0; f < NF; f++) x_in[r][f] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Load parameters.
    for (int i = 0; i < WV; i++) begin
      wv[i] = rnd(-0.6, 0.6);
      @(negedge clk) v_wr_en = 1; v_wr_addr = AV'(i); v_wr_data = r2fx(wv[i]);
    end
    for (int i = 0; i < WL; i++) begin
      wl[i] = rnd(-0.6, 0.6);
      @(negedge clk) l_wr_en = 1; l_wr_addr = AL'(i); l_wr_data = r2fx(wl[i]);
    end
    @(negedge clk) v_wr_en = 0; l_wr_en = 0;
    for (int i = 0; i < WV; i += 7) begin
      v_rd_addr = AV'(i);
      #1;
      checks++;
      if (v_rd_data != r2fx(wv[i])) begin failures++; $display("readback %0d", i); end
    end
    for (int t = 0; t < 5; t++) begin
      int cycles, lat_v, lat_l;
      for (int r = 0; r < ROWS; r++)
        for (int f = 0; f < NF; f++) begin xr[r][f] = rnd(0.0, 1.0); x_in[r][f] = r2fx(xr[r][f]); end
      rv = r_model(xr, ROWS, NF, D, DFF, H, NV, 1'b0, wv);
      rl = r_model(xr, ROWS, NF, D, DFF, 1, NL, 1'b1, wl);
      @(negedge clk) v_start = 1; l_start = 1;
      @(negedge clk) v_start = 0; l_start = 0;
      // The input may change once captured.
      for (int r = 0; r < ROWS; r++) for (int f = 0; f < NF; f++) x_in[r][f] = fx_t'($urandom);
      cycles = 0; lat_v = 0; lat_l = 0;
      while (lat_v == 0 || lat_l == 0) begin
        @(negedge clk);
        cycles++;
        if (v_done) lat_v = cycles;
        if (l_done) lat_l = cycles;
        if (cycles > 5000) break;
      end
      checks += 2;
      if (lat_v != VLAT) begin failures++; $display("vanilla latency %0d, expected %0d", lat_v, VLAT); end
      if (lat_l != LLAT) begin failures++; $display("linear latency %0d, expected %0d", lat_l, LLAT); end
      for (int r = 0; r < ROWS; r++) begin
        checks += 2;
        if (!close(fx2r(v_logit[r]), rv[r][0], 5e-3, 5e-3)) begin
          failures++; $display("vanilla logit[%0d] = %f, expected %f", r, fx2r(v_logit[r]), rv[r][0]);
        end
        if (!close(fx2r(l_logit[r]), rl[r][0], 5e-3, 5e-3)) begin
          failures++; $display("linear logit[%0d] = %f, expected %f", r, fx2r(l_logit[r]), rl[r][0]);
        end
        if (rv[r][0] > 0.01 || rv[r][0] < -0.01) begin
          checks++;
          if (v_anom[r] != (rv[r][0] > 0.0)) begin failures++; $display("vanilla flag %0d", r); end
        end
        if (rl[r][0] > 0.01 || rl[r][0] < -0.01) begin
          checks++;
          if (l_anom[r] != (rl[r][0] > 0.0)) begin failures++; $display("linear flag %0d", r); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
