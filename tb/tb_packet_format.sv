// tb_packet_format: self-checking test of packet framing and radio control.
//
// The testbench plays the queue: it holds random records (full and min/max)
// and presents the head with rd_valid and its level. Records arrive in
// bursts. Bits are taken with a random bit_ready. Checks: rf_on stays low
// until 4 records are queued and drops once the queue is empty and the last
// packet is out; each packet's bits equal SYNC, minmax, ID, time stamp and
// samples assembled by the testbench; bit_sop marks exactly the first bit.
module tb_packet_format;
  import neural_dsp_pkg::*;

  localparam int unsigned LW = 4;

  logic          clk = 0, rst = 1;
  event_rec_t    rd_data;
  logic          rd_valid, rd_ready;
  logic [LW-1:0] level;
  logic          rf_on, bit_out, bit_sop, bit_valid, bit_ready = 0;
  logic [15:0]   pkt_count;
  int checks = 0, failures = 0, packets = 0, n_minmax = 0, wakeups = 0, sleeps = 0;

  event_rec_t q [$];
  bit         expbits [$];

  packet_format #(.TX_START(4), .LW(LW)) dut (.*);

  always #5 clk = ~clk;

  assign rd_valid = q.size() > 0;
  assign rd_data  = rd_valid ? q[0] : '0;
  assign level    = LW'(q.size());

  initial begin
    #5000000;
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

  function automatic void push_bits(input logic [31:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) expbits.push_back(v[i]);
  endfunction

  // Expected packet of a record, assembled field by field.
  function automatic void expect_packet(input event_rec_t r);
    push_bits(32'h7E, 8);
    push_bits(32'(r.rec.minmax), 1);
    push_bits(32'(r.id), ID_W);
    push_bits(32'(r.ts), TS_W);
    for (int i = 0; i < (r.rec.minmax ? 2 : int'(WIN)); i++) push_bits(32'(r.rec.samples[i]), DATA_W);
  endfunction

  event_rec_t mk;
  bit         rf_prev = 0, in_pkt = 0;
  int         bitpos = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 40000; n++) begin
      // a burst of 1..6 records every 2000 clocks
      if (n % 2000 == 10) begin
        repeat (1 + $urandom % 6) begin
          mk = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
          if ($urandom % 2) begin
            mk.rec.minmax = 1;
            for (int i = 2; i < int'(WIN); i++) mk.rec.samples[i] = '0;
          end else mk.rec.minmax = 0;
          if (q.size() < 8) q.push_back(mk);
        end
      end
      bit_ready = 1'($urandom % 4 != 0);
      #1;
      if (!rf_prev && rf_on) wakeups++;
      if (rf_prev && !rf_on) sleeps++;
      rf_prev = rf_on;
      if (bit_valid && bit_ready) begin
        check(expbits.size() > 0, "bit without an expected packet");
        if (expbits.size() > 0) begin
          check(bit_out == expbits.pop_front(), $sformatf("packet %0d bit %0d", packets, bitpos));
          check(bit_sop == (bitpos == 0), "bit_sop");
          bitpos++;
        end
      end
      if (rd_ready) begin
        check(rf_on, "pop only with radio on");
        check(expbits.size() == 0, "previous packet complete before next");
        expect_packet(q[0]);
        if (q[0].rec.minmax) n_minmax++;
        packets++;
        bitpos = 0;
      end
      @(negedge clk);
      if (rd_ready) void'(q.pop_front());
    end
    check(packets > 10 && n_minmax > 0 && wakeups > 0 && sleeps > 0 && q.size() < 4,
          $sformatf("coverage: packets=%0d minmax=%0d wake=%0d sleep=%0d", packets, n_minmax, wakeups, sleeps));
    check(pkt_count == 16'(packets), "packet count");
    $display("packets=%0d minmax=%0d wakeups=%0d sleeps=%0d", packets, n_minmax, wakeups, sleeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rf_on must rise on the clock after the level first reaches the watermark
  // while off, and fall only when nothing is queued or being sent.
  always @(posedge clk) if (!rst) begin
    if (rf_on && !bit_valid && !rd_valid) begin
      #1;
      checks++;
      if (rf_on) begin failures++; $display("FAIL rf_on should drop"); end
    end else if (!rf_on && level < 4) begin
      #1;
      checks++;
      if (rf_on) begin failures++; $display("FAIL rf_on woke below watermark"); end
    end
  end
endmodule
