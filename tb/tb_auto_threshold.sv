// tb_auto_threshold: self-checking test of the automatic threshold generator.
//
// Uses a 16-sample window (LOG2N = 4) so that many windows pass quickly.
// Random samples and a random fixed mean are applied, one per clock; each
// output is compared with a model that keeps the whole sample history:
// abs_out = |x - mean|, and the threshold of window w+1 is
// K * floor(sum of |x - mean| over window w / N), with 80 in window 0.
// Then the scan chain is tested: its length, that shifting freezes the
// block, and that the threshold register can be read out through it.
module tb_auto_threshold;
  import neural_dsp_pkg::*;

  localparam int unsigned LOG2N = 4;
  localparam int unsigned N     = 1 << LOG2N;
  localparam int unsigned K     = 8;
  localparam int unsigned THR_W = DATA_W + $clog2(K + 1);
  localparam int unsigned CHAIN = (DATA_W + LOG2N) + LOG2N + 1 + THR_W + 2 * DATA_W;
  localparam int unsigned NS    = 8 * N;

  logic             clk = 0, rst = 1;
  sample_t          data_in = '0, mean = '0, data_out, abs_out;
  logic [THR_W-1:0] threshold;
  logic             scan_in = 0, scan_shift = 0, scan_out;

  int checks = 0, failures = 0;

  auto_threshold #(.LOG2N(LOG2N), .K(K), .INIT_THRESHOLD(80)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int unsigned x [NS];
  int unsigned a [NS];
  int unsigned exp_thr [NS/N];
  int unsigned m;

  initial begin
    m = 400 + ($urandom % 200);
    mean = sample_t'(m);
    for (int i = 0; i < int'(NS); i++) begin
      // mostly small noise around the mean, sometimes anywhere in range
      if ($urandom % 8 == 0) x[i] = $urandom % 1024;
      else x[i] = m - 20 + ($urandom % 41);
      a[i] = (x[i] > m) ? x[i] - m : m - x[i];
    end
    exp_thr[0] = 80;
    for (int w = 1; w < int'(NS / N); w++) begin
      int unsigned s;
      s = 0;
      for (int j = 0; j < int'(N); j++) s += a[(w-1)*N + j];
      exp_thr[w] = (s / N) * K;
    end

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(threshold == THR_W'(80), "threshold after reset");
    for (int i = 0; i < int'(NS); i++) begin
      data_in = sample_t'(x[i]);
      @(negedge clk);
      check(data_out == sample_t'(x[i]), $sformatf("data_out %0d", i));
      check(abs_out == sample_t'(a[i]), $sformatf("abs_out %0d: %0d vs %0d", i, abs_out, a[i]));
      check(threshold == THR_W'(exp_thr[i / N]),
            $sformatf("threshold at sample %0d: %0d vs %0d", i, threshold, exp_thr[i / N]));
    end

    // Scan: read the state out; the threshold register sits after the
    // accumulator, the counter and the window-full flag in the chain.
    begin
      logic [CHAIN-1:0] got, pat;
      logic [THR_W-1:0] thr_seen;
      scan_shift = 1;
      for (int i = 0; i < int'(CHAIN); i++) begin
        got[CHAIN-1-i] = scan_out;
        scan_in = 1'b0;
        @(negedge clk);
      end
      thr_seen = got[CHAIN-1-(DATA_W+LOG2N)-LOG2N-1 -: THR_W];
      check(thr_seen == THR_W'(exp_thr[NS/N - 1]), $sformatf("threshold via scan %0d", thr_seen));
      check(got[2*DATA_W-1:DATA_W] == sample_t'(x[NS-1]), "data register via scan");
      // chain length: a pattern shifted in appears after exactly CHAIN shifts
      for (int i = 0; i < int'(CHAIN); i++) pat[i] = 1'($urandom);
      for (int i = 0; i < int'(CHAIN); i++) begin
        scan_in = pat[CHAIN-1-i];
        @(negedge clk);
      end
      scan_in = 0;
      for (int i = 0; i < int'(CHAIN); i++) begin
        got[CHAIN-1-i] = scan_out;
        @(negedge clk);
      end
      check(got == pat, "scan chain length and contents");
      scan_shift = 0;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
