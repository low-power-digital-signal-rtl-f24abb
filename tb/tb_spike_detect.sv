// tb_spike_detect: self-checking test of the spike detector.
//
// A random stream of samples and deviations is applied with a threshold that
// changes now and then, plus hand-placed crossings: an isolated one, two 16
// samples apart (back to back, no idle clock allowed between the windows) and
// one inside a running window (must be ignored). A model computes which
// crossings start a window: a crossing at sample d starts one if no window
// is running, or the running one is on its last sample. After the clock that
// takes sample i the detector must show data_out = sample i-4, and
// data_valid / count_out = i-d while i lies in a window starting at d. The
// window length (16 high cycles per spike) and the scan chain are checked too.
module tb_spike_detect;
  import neural_dsp_pkg::*;

  localparam int unsigned THR_W = 14;
  localparam int unsigned CHAIN = PRE * DATA_W + DATA_W + 1 + CNT_W;
  localparam int NS = 3000;

  logic             clk = 0, rst = 1;
  sample_t          data_in = '0, abs_in = '0, data_out;
  logic [THR_W-1:0] threshold = '0;
  logic             data_valid;
  logic [CNT_W-1:0] count_out;
  logic             scan_in = 0, scan_shift = 0, scan_out;

  int checks = 0, failures = 0;

  spike_detect #(.THR_W(THR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  int unsigned x [NS], a [NS], t [NS];
  int          start_of [NS];   // window start covering sample i, or -1
  int          windows = 0, back_to_back = 0, ignored = 0, high_run = 0;

  initial begin
    int last_d;
    int unsigned thr;
    thr = 300;
    for (int i = 0; i < NS; i++) begin
      if (i % 500 == 0 && i > 0) thr = 200 + $urandom % 400;
      t[i] = thr;
      x[i] = $urandom % 1024;
      a[i] = ($urandom % 16 == 0) ? $urandom % 1024 : $urandom % 100;
    end
    // hand-placed cases (threshold there is 300)
    for (int i = 40; i < 140; i++) a[i] = 10;
    a[50]  = 900;             // isolated
    a[100] = 900;             // window 100..115
    a[108] = 900;             // inside a window: ignored
    a[116] = 900;             // back to back with the previous one
    a[300] = 300;             // equal to the threshold: no detection

    last_d = -1000;
    for (int i = 0; i < NS; i++) start_of[i] = -1;
    for (int i = 0; i < NS; i++) begin
      if (a[i] > t[i]) begin
        if (i >= last_d + int'(WIN)) begin
          if (i == last_d + int'(WIN)) back_to_back++;
          last_d = i;
          windows++;
        end else ignored++;
      end
      if (i - last_d < int'(WIN)) start_of[i] = last_d;
    end

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < NS; i++) begin
      data_in   = sample_t'(x[i]);
      abs_in    = sample_t'(a[i]);
      threshold = THR_W'(t[i]);
      @(negedge clk);
      if (i >= int'(PRE)) check(data_out == sample_t'(x[i-PRE]), $sformatf("data_out at %0d", i));
      check(data_valid == (start_of[i] >= 0), $sformatf("data_valid at %0d", i));
      if (start_of[i] >= 0)
        check(count_out == CNT_W'(i - start_of[i]), $sformatf("count_out at %0d", i));
      // an isolated spike keeps data_valid high for exactly WIN samples
      if (i == 50 + int'(WIN) - 1) check(data_valid, "last cycle of isolated window");
      if (i == 50 + int'(WIN))     check(!data_valid, "isolated window ends after 16");
      if (i == 116) check(data_valid && count_out == 0, "back-to-back window restarts at once");
    end
    check(back_to_back > 0 && ignored > 0, "hand-placed cases reached");

    // scan chain length and contents
    begin
      logic [CHAIN-1:0] got, pat;
      scan_shift = 1;
      for (int i = 0; i < int'(CHAIN); i++) pat[i] = 1'($urandom);
      for (int i = 0; i < int'(CHAIN); i++) begin
        scan_in = pat[CHAIN-1-i];
        @(negedge clk);
      end
      for (int i = 0; i < int'(CHAIN); i++) begin
        got[CHAIN-1-i] = scan_out;
        scan_in = 0;
        @(negedge clk);
      end
      check(got == pat, "scan chain length and contents");
      scan_shift = 0;
    end

    $display("windows=%0d back_to_back=%0d ignored=%0d", windows, back_to_back, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
