// tb_param_regfile: writes random words to random addresses of a 37-word
// param_regfile, keeps a shadow copy, and checks the parallel outputs and the
// read port after every write; writes beyond the last word must be ignored and
// reset must clear every word.
module tb_param_regfile;
  import tfm_pkg::*;

  localparam int N_WORDS = 37;
  localparam int AW = $clog2(N_WORDS);

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  fx_t wr_data = '0, rd_data;
  fx_t q [N_WORDS];
  fx_t shadow [N_WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  param_regfile #(.N_WORDS(N_WORDS)) dut (.*);

  initial begin
    #500000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < N_WORDS; i++) begin
      checks++;
      if (q[i] != shadow[i]) begin
        failures++;
        $display("word %0d = %h, expected %h", i, q[i], shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N_WORDS; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare_all();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_addr = AW'($urandom_range(0, (1 << AW) - 1));
      wr_data = fx_t'($urandom);
      rd_addr = AW'($urandom_range(0, N_WORDS - 1));
      @(posedge clk);
      if (wr_en && int'(wr_addr) < N_WORDS) shadow[wr_addr] = wr_data;
      #1;
      compare_all();
      checks++;
      if (rd_data != shadow[rd_addr]) begin
        failures++;
        $display("read port %0d = %h", rd_addr, rd_data);
      end
    end
    @(negedge clk) wr_en = 0;
    rst_n = 0;
    #1;
    for (int i = 0; i < N_WORDS; i++) shadow[i] = '0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
