// tb_neural_dsp_top: end-to-end test of the spike processing chain at its
// full size (16384-sample mean and threshold windows, K = 8, 8-record queue).
//
// About three threshold windows of synthetic recording are applied, one
// sample per clock: noise around an offset of 500 with spikes of two sizes
// (peaks 300 and 150 above the offset). The testbench keeps its own model of
// the chain: the block-average mean (or mean_in while use_ext_mean is high),
// the absolute deviations (the external mean is 495), the threshold of every window (80 in the first,
// then 8 * floor(mean deviation)) or the programmed threshold, and which
// crossings start a 16-sample window. The symbol stream leaving the encoder
// is decoded back to bits (the code is inverted from its taps), cut into
// packets and compared with the model: sync word, electrode ID, time stamp
// (detection sample + 18 clocks), and the 16 window samples or, for
// records the queue marked as overflowing, their max and min. Records the
// queue drops when full must match drop_count.
//
// Phases: the transmitter stalls for a while early on, so the queue reaches
// overflow and drops records; the programmed threshold (200) and the
// external mean are used for a stretch. Every mechanism is counted and a
// mechanism that never happened counts as a failure. The scan chain through
// both signal-processing blocks is shifted at the end.
module tb_neural_dsp_top;
  import neural_dsp_pkg::*;

  localparam int N       = 16384;
  localparam int NS      = 3 * N + 2000;
  localparam int THR_W   = 14;
  localparam int DEPTH   = 8;
  localparam int CHAIN   = (24 + 14 + 1 + 14 + 20) + (PRE * DATA_W + DATA_W + 1 + CNT_W);
  localparam int EXT_THR = 200;

  logic             clk = 0, rst = 1;
  sample_t          data_in = '0, mean_in = '0;
  logic [ID_W-1:0]  electrode_id = 7'd42;
  logic             use_ext_mean = 0, ext_thr_wr = 0, use_ext_thr = 0;
  logic [THR_W-1:0] ext_thr_value = '0;
  logic             scan_in = 0, scan_shift = 0, scan_out;
  sample_t          data_out, mean_out;
  logic             data_valid_out, overflow, rf_on, sym_sop, sym_valid, sym_ready = 0;
  logic [CNT_W-1:0] count_out;
  logic [THR_W-1:0] threshold_out;
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
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus and model ----------------
  int unsigned x [NS], a [NS], t [NS], mu [NS];
  bit          ext_mean_at [NS], ext_thr_at [NS + 1], stall_at [NS];
  int          start_of [NS];
  int unsigned meanw [4], thrw [4];

  // mechanism counters
  int n_init_thr = 0, n_auto_thr = 0, n_ext_thr = 0, n_ext_mean = 0;
  int n_b2b = 0, n_ignored = 0, n_full = 0, n_minmax = 0, n_drop = 0;
  int n_wake = 0, n_sleep = 0, n_stall = 0, n_small_missed = 0;

  function automatic void add_spike(int p, int big);
    if (big) begin
      x[p] = 800; x[p+1] = 650; x[p+2] = 400; x[p+3] = 450;
    end else begin
      x[p] = 650; x[p+1] = 560;
    end
  endfunction

  // expected records, in detection order
  typedef struct {
    int         d;
    bit         minmax;  // filled in when the record is built
    bit         dropped;
  } exp_rec_t;
  exp_rec_t exp_q [$];

  initial begin
    int last_d, w;
    for (int i = 0; i < NS; i++) x[i] = 492 + $urandom % 17;
    // window 0: a spike every 400 samples, transmitter stalled 2000..12000
    for (int p = 1000; p < 15000; p += 400) add_spike(p, 1);
    add_spike(5016, 1);                        // back to back with 5000
    // window 1: big and small spikes; external mean 20000..22000
    for (int p = 17000; p < 32000; p += 500) add_spike(p, (p / 500) % 2);
    // window 2: same; programmed threshold 35000..42000
    for (int p = 33500; p < 48500; p += 500) add_spike(p, (p / 500) % 2);
    for (int i = 0; i < NS; i++) begin
      ext_mean_at[i] = (i >= 20000 && i < 22000);
      ext_thr_at[i]  = (i >= 35000 && i < 42000);
      stall_at[i]    = (i >= 2000 && i < 12000);
    end
    ext_thr_at[NS] = 0;

    // mean: 512 in the first window, then the block average of the previous
    meanw[0] = 512;
    for (int v = 1; v < 4; v++) begin
      longint s;
      s = 0;
      for (int j = 0; j < N && (v-1)*N + j < NS; j++) s += x[(v-1)*N + j];
      meanw[v] = int'(s / N);
    end
    for (int i = 0; i < NS; i++) begin
      mu[i] = ext_mean_at[i] ? 500 : meanw[i / N];
      a[i]  = (x[i] > mu[i]) ? x[i] - mu[i] : mu[i] - x[i];
    end
    thrw[0] = 80;
    for (int v = 1; v < 4; v++) begin
      longint s;
      s = 0;
      for (int j = 0; j < N && (v-1)*N + j < NS; j++) s += a[(v-1)*N + j];
      thrw[v] = int'(s / N) * 8;
    end
    // sample i is compared while sample i+1 is applied
    for (int i = 0; i < NS; i++) t[i] = ext_thr_at[i+1] ? EXT_THR : thrw[i / N];

    last_d = -1000;
    for (int i = 0; i < NS; i++) begin
      start_of[i] = -1;
      if (a[i] > t[i]) begin
        if (i >= last_d + int'(WIN)) begin
          exp_rec_t r;
          if (i == last_d + int'(WIN)) n_b2b++;
          last_d = i;
          r.d = i; r.minmax = 0; r.dropped = 0;
          exp_q.push_back(r);
          if (ext_thr_at[i+1]) n_ext_thr++;
          else if (i < N) n_init_thr++;
          else n_auto_thr++;
        end else n_ignored++;
      end else if (ext_thr_at[i+1] && a[i] > 100 && a[i] <= EXT_THR) n_small_missed++;
      if (i - last_d < int'(WIN)) start_of[i] = last_d;
      if (ext_mean_at[i]) n_ext_mean++;
    end
    $display("model: records=%0d thresholds %0d %0d %0d means %0d %0d %0d",
             exp_q.size(), thrw[1], thrw[2], thrw[3], meanw[1], meanw[2], meanw[3]);
  end

  // ---------------- drive ----------------
  int  edge_i = -1;         // index of the sample taken at the last edge
  bit  running = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst           = 0;
    ext_thr_wr    = 1;
    ext_thr_value = THR_W'(EXT_THR);
    @(negedge clk);           // write the programmed threshold, one idle clock
    ext_thr_wr = 0;
    @(negedge clk);
    rst = 1;                  // restart the chain; the programmed value is lost
    @(negedge clk);
    rst = 0;
    ext_thr_wr = 1;           // program again, together with the first sample
    running = 1;
    for (int i = 0; i < NS; i++) begin
      data_in      = sample_t'(x[i]);
      use_ext_mean = ext_mean_at[i];
      mean_in      = 10'd495;
      use_ext_thr  = ext_thr_at[i];
      sym_ready    = stall_at[i] ? 1'b0 : 1'($urandom % 10 != 0);
      @(negedge clk);
      ext_thr_wr = 0;
      edge_i = i;
      // per-sample checks of the detector outputs (sample i-1 compared now)
      if (i >= 1) begin
        int k;
        k = i - 1;
        check(data_valid_out == (start_of[k] >= 0), $sformatf("data_valid at %0d", k));
        if (start_of[k] >= 0) begin
          check(count_out == CNT_W'(k - start_of[k]), $sformatf("count at %0d", k));
          check(data_out == sample_t'(x[k - PRE]), $sformatf("data_out at %0d", k));
        end
      end
      // mean_out now: the selection made for sample i, the estimate as
      // updated by this edge
      check(mean_out == sample_t'(ext_mean_at[i] ? 495 : meanw[(i + 1) / N]), $sformatf("mean at %0d", i));
    end
    running = 0;
    use_ext_thr = 0;
    sym_ready = 1;
  end

  // record mode and drops, observed at the edges where the chain decides
  int rec_idx = 0;
  always @(posedge clk) if (running || edge_i >= 0) begin
    // feature extraction decides the mode on the window's last sample
    if (data_valid_out && count_out == CNT_W'(WIN - 1) && rec_idx < exp_q.size()) begin
      exp_q[rec_idx].minmax = overflow;
      if (overflow) n_minmax++; else n_full++;
    end
  end
  int push_idx = 0;
  always @(posedge clk) if (!rst && dut.u_fifo.wr_en) begin
    // the queue drops a record pushed while it is full
    if (fifo_level == 4'(DEPTH)) begin
      exp_q[push_idx].dropped = 1;
      n_drop++;
    end
    push_idx++;
  end
  always @(posedge clk) if (!rst && data_valid_out && count_out == CNT_W'(WIN - 1)) rec_idx++;

  // ---------------- symbol decoding and packet checks ----------------
  logic [6:0] hist = '0;    // hist[0] = newest decoded bit
  bit         pbits [$];
  int         n_pkts = 0, n_exp_next = 0;
  bit         in_pkt = 0;
  bit         rf_prev = 0;

  function automatic int unsigned field(int from, int n);
    int unsigned v = 0;
    for (int i = 0; i < n; i++) v = (v << 1) | pbits[from + i];
    return v;
  endfunction

  task automatic finish_packet();
    int idx, mm, len;
    while (n_exp_next < exp_q.size() && exp_q[n_exp_next].dropped) n_exp_next++;
    check(n_exp_next < exp_q.size(), "packet without an expected record");
    if (n_exp_next >= exp_q.size()) return;
    idx = exp_q[n_exp_next].d;
    mm  = pbits[8];
    check(field(0, 8) == 32'h7E, $sformatf("sync of packet %0d", n_pkts));
    check(mm == int'(exp_q[n_exp_next].minmax), $sformatf("mode of packet %0d", n_pkts));
    check(field(9, ID_W) == 42, "electrode id");
    check(field(16, TS_W) == ((idx + 18) & 16'hFFFF),
          $sformatf("time stamp of packet %0d: %0d vs %0d", n_pkts, field(16, TS_W), idx + 18));
    if (mm) begin
      int unsigned mx, mn;
      mx = 0; mn = 1023;
      for (int c = 0; c < int'(WIN); c++) begin
        if (x[idx - PRE + c] > mx) mx = x[idx - PRE + c];
        if (x[idx - PRE + c] < mn) mn = x[idx - PRE + c];
      end
      check(pbits.size() == PKT_MINMAX_BITS, "min/max packet length");
      check(field(32, 10) == mx && field(42, 10) == mn, $sformatf("max/min of packet %0d", n_pkts));
    end else begin
      check(pbits.size() == PKT_FULL_BITS, "full packet length");
      for (int c = 0; c < int'(WIN); c++)
        check(field(32 + c * DATA_W, DATA_W) == x[idx - PRE + c],
              $sformatf("sample %0d of packet %0d", c, n_pkts));
    end
    n_exp_next++;
    n_pkts++;
  endtask

  always @(posedge clk) if (!rst) begin
    if (rf_on && !rf_prev) n_wake++;
    if (!rf_on && rf_prev) n_sleep++;
    rf_prev <= rf_on;
    if (sym_valid && !sym_ready) n_stall++;
    if (sym_valid && sym_ready) begin
      logic u, c1;
      u  = sym[1] ^ hist[0] ^ hist[1] ^ hist[2] ^ hist[5];
      c1 = u ^ hist[1] ^ hist[2] ^ hist[4] ^ hist[5];
      check(c1 == sym[0], "second code bit consistent");
      hist = {hist[5:0], u};
      if (sym_sop) begin
        check(!in_pkt || pbits.size() == 0, "packet start inside a packet");
        pbits.delete();
        in_pkt = 1;
      end
      if (in_pkt) begin
        pbits.push_back(u);
        if (pbits.size() == (pbits.size() > 8 && pbits[8] ? PKT_MINMAX_BITS : PKT_FULL_BITS)) begin
          finish_packet();
          pbits.delete();
          in_pkt = 0;
        end
      end
    end
  end

  // ---------------- end of run ----------------
  initial begin
    wait (running);
    wait (!running);
    // drain: wait until nothing more can leave
    repeat (3000) @(negedge clk);
    begin
      int sent_expected, queued;
      queued = fifo_level;
      sent_expected = 0;
      foreach (exp_q[j]) if (!exp_q[j].dropped) sent_expected++;
      check(drop_count == 16'(n_drop), $sformatf("drop count %0d vs %0d", drop_count, n_drop));
      check(n_pkts + queued == sent_expected && queued < 4,
            $sformatf("packets %0d + queued %0d vs %0d", n_pkts, queued, sent_expected));
      check(pkt_count == 16'(n_pkts), "packet counter");
      check(!rf_on, "radio off when idle");
    end
    // scan chain through both processing blocks
    begin
      logic [CHAIN-1:0] pat, got;
      scan_shift = 1;
      for (int i = 0; i < CHAIN; i++) pat[i] = 1'($urandom);
      for (int i = 0; i < CHAIN; i++) begin
        scan_in = pat[CHAIN-1-i];
        @(negedge clk);
      end
      for (int i = 0; i < CHAIN; i++) begin
        got[CHAIN-1-i] = scan_out;
        scan_in = 0;
        @(negedge clk);
      end
      check(got == pat, "scan chain through both blocks");
      scan_shift = 0;
    end
    $display("mechanisms: init_thr=%0d auto_thr=%0d ext_thr=%0d small_missed_ext=%0d ext_mean_samples=%0d",
             n_init_thr, n_auto_thr, n_ext_thr, n_small_missed, n_ext_mean);
    $display("            back_to_back=%0d ignored=%0d full=%0d minmax=%0d drops=%0d wake=%0d sleep=%0d stalls=%0d packets=%0d",
             n_b2b, n_ignored, n_full, n_minmax, n_drop, n_wake, n_sleep, n_stall, n_pkts);
    check(n_init_thr > 0, "detection with the first-window threshold");
    check(n_auto_thr > 0, "detection with a generated threshold");
    check(n_ext_thr > 0, "detection with the programmed threshold");
    check(n_small_missed > 0, "programmed threshold rejected small spikes");
    check(n_ext_mean > 0, "external mean used");
    check(n_b2b > 0, "back-to-back windows");
    check(n_ignored > 0, "crossing inside a window");
    check(n_full > 0, "full records");
    check(n_minmax > 0, "min/max records on overflow");
    check(n_drop > 0, "records dropped when the queue was full");
    check(n_wake > 1 && n_sleep > 0, "radio woken and put to sleep");
    check(n_stall > 0, "transmitter back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
