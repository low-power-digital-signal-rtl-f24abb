// tb_fig3_spikes: the four-spike synthetic workload through the full chain.
//
// 1000 samples at a flat baseline of 512 with four synthetic spikes (a rise
// to about 900-960 and a dip to about 300), near samples 55, 355, 705 and
// 955, as in the detector's reference test. All 1000 samples lie in the first
// threshold window, so the threshold is the start-up value of 80 above the
// mean. The testbench checks that exactly four windows are produced, that
// each keeps data_valid high for 16 samples starting 4 samples before the
// crossing, that the window contents are the right samples, and that the
// four queued records wake the radio and leave as four packets.
module tb_fig3_spikes;
  import neural_dsp_pkg::*;

  localparam int NS = 1000;

  logic             clk = 0, rst = 1;
  sample_t          data_in = '0, mean_in = '0;
  logic [ID_W-1:0]  electrode_id = 7'd3;
  logic             use_ext_mean = 0, ext_thr_wr = 0, use_ext_thr = 0;
  logic [13:0]      ext_thr_value = '0;
  logic             scan_in = 0, scan_shift = 0, scan_out;
  sample_t          data_out, mean_out;
  logic             data_valid_out, overflow, rf_on, sym_sop, sym_valid, sym_ready = 1;
  logic [CNT_W-1:0] count_out;
  logic [13:0]      threshold_out;
  logic [3:0]       fifo_level;
  logic [15:0]      drop_count, pkt_count;
  logic [1:0]       sym;

  neural_dsp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned x [NS];
  int          spikes [4] = '{55, 355, 705, 955};
  int          peaks  [4] = '{900, 960, 960, 900};

  initial begin
    int windows, run, starts [$];
    for (int i = 0; i < NS; i++) x[i] = 512;
    foreach (spikes[s]) begin
      int p;
      p = spikes[s];
      x[p-2] = 600; x[p-1] = 750; x[p] = peaks[s]; x[p+1] = 700;
      x[p+2] = 450; x[p+3] = 300; x[p+4] = 420; x[p+5] = 500;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    windows = 0; run = 0;
    for (int i = 0; i < NS + 1200; i++) begin
      data_in = sample_t'(i < NS ? x[i] : 512);
      @(negedge clk);
      check(threshold_out == 14'd80, "start-up threshold");
      if (data_valid_out) begin
        if (count_out == 0) begin
          windows++;
          starts.push_back(i - 1);   // sample index of the crossing
        end
        run++;
        // window sample c is the sample taken c - 4 after the crossing
        check(data_out == sample_t'(x[starts[$] - PRE + count_out]), $sformatf("window sample at %0d", i));
      end else if (run != 0) begin
        check(run == 16, $sformatf("window length %0d", run));
        run = 0;
      end
    end
    check(windows == 4, $sformatf("windows %0d", windows));
    // the crossing is the first sample more than 80 from 512: p-2 (600)
    foreach (starts[s]) check(starts[s] == spikes[s] - 2, $sformatf("spike %0d at %0d", s, starts[s]));
    check(pkt_count == 16'd4 && fifo_level == 0 && !rf_on, "four packets sent, radio off again");
    check(drop_count == 0 && !overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
