// tb_exp_unit: sweeps exp_unit over the softmax / feature-map range [-24, 0]
// and a few positive arguments, comparing with $exp. Tolerance: 3e-4 relative
// plus 3e-5 absolute (polynomial error and the 2^-16 output step).
module tb_exp_unit;
  import tfm_pkg::*;
  import tb_ref_pkg::*;

  fx_t x, y;
  int checks = 0, failures = 0;

  exp_unit dut (.x, .y);

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input real xr);
    real e;
    x = r2fx(xr);
    #1;
    e = $exp(fx2r(x));
    checks++;
    if (!close(fx2r(y), e, 3e-5, 3e-4)) begin
      failures++;
      $display("exp(%f) = %f, expected %f", fx2r(x), fx2r(y), e);
    end
  endtask

  initial begin
    for (int i = 0; i <= 2400; i++) check(-real'(i) / 100.0);
    for (int i = 0; i < 500; i++) check(rnd(-12.0, 0.0));
    check(0.5); check(1.0); check(2.3); check(5.0);
    // Saturation for very large arguments.
    x = r2fx(40.0);
    #1;
    checks++;
    if (y != FX_MAX) begin
      failures++;
      $display("exp(40) did not saturate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
