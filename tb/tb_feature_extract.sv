// tb_feature_extract: self-checking test of window capture and max/min mode.
//
// Spike windows of 16 random samples are fed as the detector delivers them
// (data_valid high, count 0..15), some back to back, some with idle gaps, with
// the overflow flag random. One clock after each window's last sample a
// record must appear: the 16 samples in order, or, if overflow was high on
// the last sample, minmax set with the window maximum and minimum.
module tb_feature_extract;
  import neural_dsp_pkg::*;

  logic             clk = 0, rst = 1;
  sample_t          data_in = '0;
  logic             data_valid = 0, overflow = 0;
  logic [CNT_W-1:0] count_in = '0;
  spike_rec_t       rec;
  logic             rec_valid;
  int checks = 0, failures = 0, n_full = 0, n_minmax = 0;

  feature_extract dut (.*);

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

  initial begin
    sample_t w [WIN];
    sample_t mx, mn;
    bit      ovf;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 200; k++) begin
      ovf = 1'($urandom % 3 == 0);
      for (int c = 0; c < int'(WIN); c++) begin
        w[c] = sample_t'($urandom);
        data_in    = w[c];
        data_valid = 1;
        count_in   = CNT_W'(c);
        overflow   = (c == int'(WIN) - 1) ? ovf : 1'($urandom);
        @(negedge clk);
        if (c < int'(WIN) - 1) check(!rec_valid, "no record inside a window");
      end
      mx = w[0]; mn = w[0];
      foreach (w[c]) begin
        if (w[c] > mx) mx = w[c];
        if (w[c] < mn) mn = w[c];
      end
      data_valid = 0;
      data_in    = sample_t'($urandom);
      count_in   = CNT_W'($urandom);
      check(rec_valid, "record after last sample");
      if (ovf) begin
        n_minmax++;
        check(rec.minmax && rec.samples[0] == mx && rec.samples[1] == mn,
              $sformatf("minmax record %0d: %0d/%0d vs %0d/%0d", k, rec.samples[0], rec.samples[1], mx, mn));
      end else begin
        n_full++;
        check(!rec.minmax, "full record flag");
        for (int c = 0; c < int'(WIN); c++)
          check(rec.samples[c] == w[c], $sformatf("record %0d sample %0d", k, c));
      end
      // idle gap of 0..3 clocks (0 = back to back)
      if ($urandom % 2 == 0) begin
        repeat ($urandom % 4) begin
          @(negedge clk);
          check(!rec_valid, "no record while idle");
        end
      end
    end
    check(n_full > 0 && n_minmax > 0, "both record kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
