// tb_compute_mean: self-checking test of the block-average mean estimator.
//
// With a 32-sample window, random samples around a drifting offset are
// applied. The mean must read 512 during the first window and, during each
// later window, floor(sum of the previous window's samples / 32).
module tb_compute_mean;
  import neural_dsp_pkg::*;

  localparam int unsigned LOG2N = 5;
  localparam int unsigned N     = 1 << LOG2N;
  localparam int NS = 10 * N;

  logic    clk = 0, rst = 1;
  sample_t data_in = '0, mean;
  int checks = 0, failures = 0;
  int unsigned x [NS], expm [NS / N];

  compute_mean #(.LOG2N(LOG2N), .INIT_MEAN(512)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS; i++) x[i] = 300 + (i / N) * 40 + $urandom % 64;
    expm[0] = 512;
    for (int w = 1; w < NS / int'(N); w++) begin
      int unsigned s;
      s = 0;
      for (int j = 0; j < int'(N); j++) s += x[(w-1)*N + j];
      expm[w] = s / N;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < NS; i++) begin
      checks++;
      if (mean != sample_t'(expm[i / N])) begin
        failures++;
        $display("FAIL mean at sample %0d: %0d vs %0d", i, mean, expm[i / N]);
      end
      data_in = sample_t'(x[i]);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
