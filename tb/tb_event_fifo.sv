// tb_event_fifo: self-checking test of the transmit queue.
//
// Random pushes and pops, with phases that fill the queue and phases that
// drain it, are checked against a queue model: head record, level, the
// overflow flag (level >= 6), and the count of records dropped when full.
module tb_event_fifo;
  import neural_dsp_pkg::*;

  localparam int unsigned DEPTH = 8, OVF = 6, LW = 4;

  logic          clk = 0, rst = 1;
  event_rec_t    wr_data = '0, rd_data;
  logic          wr_en = 0, rd_ready = 0, rd_valid, overflow;
  logic [LW-1:0] level;
  logic [15:0]   drop_count;
  int checks = 0, failures = 0, drops = 0, max_level = 0;
  event_rec_t    q [$];

  event_fifo #(.DEPTH(DEPTH), .OVF_LEVEL(OVF)) dut (.*);

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
    int pw, pr;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 4000; n++) begin
      // alternate filling and draining phases
      pw = ((n / 200) % 2 == 0) ? 70 : 20;
      pr = ((n / 200) % 2 == 0) ? 20 : 70;
      wr_en    = 1'(($urandom % 100) < pw);
      wr_data  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      rd_ready = 1'(($urandom % 100) < pr);
      #1;
      check(level == LW'(q.size()), $sformatf("level %0d vs %0d", level, q.size()));
      check(rd_valid == (q.size() > 0), "rd_valid");
      check(overflow == (q.size() >= OVF), "overflow");
      if (q.size() > 0) check(rd_data == q[0], "head record");
      begin
        bit was_full, do_pop;
        was_full = (q.size() == DEPTH);
        do_pop   = (q.size() > 0) && rd_ready;
        @(negedge clk);
        // a push into a full queue is dropped, even with a pop on that edge
        if (do_pop) void'(q.pop_front());
        if (wr_en && was_full) drops++;
        else if (wr_en) q.push_back(wr_data);
      end
      if (q.size() > max_level) max_level = q.size();
    end
    check(drop_count == 16'(drops) && drops > 0, $sformatf("drops %0d vs %0d", drop_count, drops));
    check(max_level == DEPTH, "queue filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
