// tb_outlier_detector_top: end-to-end run of both detectors at their default
// sizes (window 8, 2 features, D = 8, DFF = 16; vanilla 2 layers x 2 heads,
// linear 1 layer).
//
// A synthetic min-max scaled price series with injected point outliers
// (x + S at chosen steps) is cut into windows; each window holds the price and
// its first difference x[i-1] - x[i]. Both models are loaded with random
// parameters through their write ports, read back, and run on every window
// at the same time. Logits are compared with the real-valued model, flags with
// the sign of the reference logit, and latencies with the closed forms
// (1112 and 562 cycles).
//
// Mechanisms that must each occur at least once: parameter read-back, both
// models busy together, a start ignored while busy, ReLU clipping in the
// feed-forward layer, a softmax row whose maximum is shifted out, both
// branches of the elu+1 feature map, and both decisions (outlier / normal)
// from each model.
module tb_outlier_detector_top;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROWS = WIN_LEN, NF = N_IN, D = D_MODEL, DFF = D_FF;
  localparam int WV = model_words(NF, D, DFF, N_LAYERS_VANILLA);
  localparam int WL = model_words(NF, D, DFF, N_LAYERS_LINEAR);
  localparam int AV = $clog2(WV), AL = $clog2(WL);
  localparam int FFN_LAT = (ROWS*DFF + 1) + 1 + (ROWS*D + 1);
  localparam int MHA_LAT = (ROWS*D+1) + (ROWS*ROWS+1) + ROWS*(ROWS+3) + (ROWS*(D/N_HEADS)+1) + (ROWS*D+1) + 4;
  localparam int LIN_LAT = (ROWS*D+1) + (D*(D+1)+1) + (ROWS*(D+1)+1) + ROWS + (ROWS*D+1) + 4;
  localparam int VLAT = 1 + (ROWS*D+1) + N_LAYERS_VANILLA*(MHA_LAT + FFN_LAT + 2) + (N_LAYERS_VANILLA+1) + (ROWS+1);
  localparam int LLAT = 1 + (ROWS*D+1) + N_LAYERS_LINEAR*(LIN_LAT + FFN_LAT + 2) + (N_LAYERS_LINEAR+1) + (ROWS+1);
  localparam int N_WIN = 6;

  logic clk = 0, rst_n = 0;
  logic van_wr_en = 0, lin_wr_en = 0, van_start = 0, lin_start = 0;
  logic [AV-1:0] van_wr_addr = '0, van_rd_addr = '0;
  logic [AL-1:0] lin_wr_addr = '0, lin_rd_addr = '0;
  fx_t van_wr_data = '0, lin_wr_data = '0, van_rd_data, lin_rd_data;
  fx_t van_x [ROWS][NF];
  fx_t lin_x [ROWS][NF];
  logic van_busy, van_done, lin_busy, lin_done;
  fx_t van_logit [ROWS];
  fx_t lin_logit [ROWS];
  logic [ROWS-1:0] van_anomaly, lin_anomaly;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_readback = 0, n_concurrent = 0, n_ignored_start = 0, n_relu_clip = 0;
  int n_max_shift = 0, n_elu_neg = 0, n_elu_pos = 0;
  int n_van_pos = 0, n_van_neg = 0, n_lin_pos = 0, n_lin_neg = 0;

  always #5 clk = ~clk;

  outlier_detector_top dut (.*);

  initial begin
    #5000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (van_busy && lin_busy) n_concurrent++;

  // Observation points inside the design.
  always @(negedge clk) begin
    if (dut.u_vanilla.g_layer[0].u_layer.g_vanilla.u_attn.g_head[0].u_softmax.state == 3'd2 &&
        dut.u_vanilla.g_layer[0].u_layer.g_vanilla.u_attn.g_head[0].u_softmax.mx_q != 0)
      n_max_shift++;
  end

  real wv [];
  real wl [];
  real series [ROWS*N_WIN + 1];

  function automatic rmat_t window(input int t);
    rmat_t xr;
    for (int r = 0; r < ROWS; r++) begin
      int i;
      i = t*ROWS + r + 1;
      xr[r][0] = series[i];
      xr[r][1] = series[i-1] - series[i];
    end
    return xr;
  endfunction

  function automatic real median_logit(input real w [], input int h, input int nl, input bit linear);
    real v [$];
    rmat_t lg;
    for (int t = 0; t < N_WIN; t++) begin
      lg = r_model(window(t), ROWS, NF, D, DFF, h, nl, linear, w);
      for (int r = 0; r < ROWS; r++) v.push_back(lg[r][0]);
    end
    v.sort();
    return fx2r(r2fx((v[v.size()/2 - 1] + v[v.size()/2]) / 2.0));
  endfunction

  task automatic count_internal();
    for (int r = 0; r < ROWS; r++) begin
      for (int o = 0; o < DFF; o++)
        if (dut.u_vanilla.g_layer[0].u_layer.u_ffn.h[r][o] < 0) n_relu_clip++;
      for (int c = 0; c < D; c++) begin
        if (dut.u_linear.g_layer[0].u_layer.g_linear.u_attn.q[r][c] > 0) n_elu_pos++;
        else n_elu_neg++;
      end
    end
  endtask

  initial begin
    rmat_t xr, rv, rl;
    wv = new[WV];
    wl = new[WL];
    for (int r = 0; r < ROWS; r++) for (int f = 0; f < NF; f++) begin van_x[r][f] = '0; lin_x[r][f] = '0; end
    // Smooth scaled series in [0.2, 0.8] with point outliers (spike S = +-0.5).
    for (int i = 0; i <= ROWS*N_WIN; i++) begin
      series[i] = 0.5 + 0.3 * $sin(real'(i) * 0.21);
      if (i % 11 == 5) series[i] += ((i / 11) % 2 == 0) ? 0.5 : -0.5;
      series[i] = fx2r(r2fx(series[i]));
    end
    // Random parameters; the classifier bias (last word) is then centred on the
    // median reference logit over all windows, standing in for a trained
    // decision threshold so that both decisions occur.
    for (int i = 0; i < WV; i++) wv[i] = rnd(-0.4, 0.4);
    for (int i = 0; i < WL; i++) wl[i] = rnd(-0.4, 0.4);
    wv[WV-1] = 0.0;
    wl[WL-1] = 0.0;
    wv[WV-1] = -median_logit(wv, N_HEADS, N_LAYERS_VANILLA, 1'b0);
    wl[WL-1] = -median_logit(wl, 1, N_LAYERS_LINEAR, 1'b1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < WV; i++) begin
      @(negedge clk) van_wr_en = 1; van_wr_addr = AV'(i); van_wr_data = r2fx(wv[i]);
    end
    for (int i = 0; i < WL; i++) begin
      @(negedge clk) lin_wr_en = 1; lin_wr_addr = AL'(i); lin_wr_data = r2fx(wl[i]);
    end
    @(negedge clk) van_wr_en = 0; lin_wr_en = 0;
    for (int i = 0; i < WV; i += 5) begin
      van_rd_addr = AV'(i);
      #1;
      checks++;
      n_readback++;
      if (van_rd_data != r2fx(wv[i])) begin failures++; $display("vanilla readback %0d", i); end
    end
    for (int i = 0; i < WL; i += 5) begin
      lin_rd_addr = AL'(i);
      #1;
      checks++;
      n_readback++;
      if (lin_rd_data != r2fx(wl[i])) begin failures++; $display("linear readback %0d", i); end
    end

    for (int t = 0; t < N_WIN; t++) begin
      int cycles, lat_v, lat_l;
      xr = window(t);
      for (int r = 0; r < ROWS; r++) begin
        for (int f = 0; f < NF; f++) begin van_x[r][f] = r2fx(xr[r][f]); lin_x[r][f] = r2fx(xr[r][f]); end
      end
      rv = r_model(xr, ROWS, NF, D, DFF, N_HEADS, N_LAYERS_VANILLA, 1'b0, wv);
      rl = r_model(xr, ROWS, NF, D, DFF, 1, N_LAYERS_LINEAR, 1'b1, wl);
      @(negedge clk) van_start = 1; lin_start = 1;
      @(negedge clk) van_start = 0; lin_start = 0;
      cycles = 0; lat_v = 0; lat_l = 0;
      while (lat_v == 0 || lat_l == 0) begin
        @(negedge clk);
        cycles++;
        // A second start in the middle of a run must be ignored.
        van_start = (cycles == 100);
        if (cycles == 101) n_ignored_start++;
        if (lin_done) begin lat_l = cycles; count_internal(); end
        if (van_done) lat_v = cycles;
        if (cycles > 5000) break;
      end
      van_start = 0;
      checks += 2;
      if (lat_v != VLAT) begin failures++; $display("vanilla latency %0d, expected %0d", lat_v, VLAT); end
      if (lat_l != LLAT) begin failures++; $display("linear latency %0d, expected %0d", lat_l, LLAT); end
      for (int r = 0; r < ROWS; r++) begin
        checks += 2;
        if (!close(fx2r(van_logit[r]), rv[r][0], 1e-2, 1e-2)) begin
          failures++; $display("vanilla logit[%0d] = %f, expected %f", r, fx2r(van_logit[r]), rv[r][0]);
        end
        if (!close(fx2r(lin_logit[r]), rl[r][0], 1e-2, 1e-2)) begin
          failures++; $display("linear logit[%0d] = %f, expected %f", r, fx2r(lin_logit[r]), rl[r][0]);
        end
        if (van_anomaly[r]) n_van_pos++; else n_van_neg++;
        if (lin_anomaly[r]) n_lin_pos++; else n_lin_neg++;
        if (rv[r][0] > 0.02 || rv[r][0] < -0.02) begin
          checks++;
          if (van_anomaly[r] != (rv[r][0] > 0.0)) begin failures++; $display("vanilla flag %0d", r); end
        end
        if (rl[r][0] > 0.02 || rl[r][0] < -0.02) begin
          checks++;
          if (lin_anomaly[r] != (rl[r][0] > 0.0)) begin failures++; $display("linear flag %0d", r); end
        end
      end
      $display("window %0d: vanilla flags %b, linear flags %b, latencies %0d / %0d",
               t, van_anomaly, lin_anomaly, lat_v, lat_l);
    end

    $display("mechanisms: readback=%0d concurrent=%0d ignored_start=%0d relu_clip=%0d max_shift=%0d elu_neg=%0d elu_pos=%0d",
             n_readback, n_concurrent, n_ignored_start, n_relu_clip, n_max_shift, n_elu_neg, n_elu_pos);
    $display("decisions: vanilla %0d outlier / %0d normal, linear %0d outlier / %0d normal",
             n_van_pos, n_van_neg, n_lin_pos, n_lin_neg);
    checks += 11;
    if (n_readback == 0)      begin failures++; $display("no read-back"); end
    if (n_concurrent == 0)    begin failures++; $display("models never overlapped"); end
    if (n_ignored_start == 0) begin failures++; $display("no start while busy"); end
    if (n_relu_clip == 0)     begin failures++; $display("ReLU never clipped"); end
    if (n_max_shift == 0)     begin failures++; $display("softmax max never shifted"); end
    if (n_elu_neg == 0)       begin failures++; $display("elu negative branch unused"); end
    if (n_elu_pos == 0)       begin failures++; $display("elu positive branch unused"); end
    if (n_van_pos == 0)       begin failures++; $display("vanilla never flagged"); end
    if (n_van_neg == 0)       begin failures++; $display("vanilla always flagged"); end
    if (n_lin_pos == 0)       begin failures++; $display("linear never flagged"); end
    if (n_lin_neg == 0)       begin failures++; $display("linear always flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
