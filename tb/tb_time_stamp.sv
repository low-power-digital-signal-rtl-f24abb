// tb_time_stamp: self-checking test of the time stamp and electrode ID tag.
//
// Random records arrive at random times. Each must leave one clock later with
// the same contents, the electrode ID applied at the time, and a time stamp
// equal to the number of clocks since reset was released, counted by the
// testbench.
module tb_time_stamp;
  import neural_dsp_pkg::*;

  logic            clk = 0, rst = 1;
  logic [ID_W-1:0] electrode_id = '0;
  spike_rec_t      rec = '0;
  logic            rec_valid = 0;
  event_rec_t      ev;
  logic            ev_valid;
  int checks = 0, failures = 0;

  time_stamp dut (.*);

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
    spike_rec_t      r;
    logic [ID_W-1:0] id;
    bit              v;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 70000; n++) begin   // runs past the 16-bit wrap
      v  = 1'($urandom % 7 == 0);
      r  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      id = ID_W'($urandom);
      rec_valid    = v;
      rec          = r;
      electrode_id = id;
      @(negedge clk);
      check(ev_valid == v, $sformatf("ev_valid at %0d", n));
      if (v) check(ev.rec == r && ev.id == id && ev.ts == TS_W'(n),
                   $sformatf("event at %0d: ts %0d", n, ev.ts));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
