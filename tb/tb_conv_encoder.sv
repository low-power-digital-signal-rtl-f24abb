// tb_conv_encoder: self-checking test of the rate 1/2, K = 7 encoder.
//
// Random bits are offered with random in_valid while the consumer takes
// symbols with a random sym_ready. Every symbol is compared, in order, with
// the code written out tap by tap: c0 = u[n]^u[n-1]^u[n-2]^u[n-3]^u[n-6]
// (171 octal) and c1 = u[n]^u[n-2]^u[n-3]^u[n-5]^u[n-6] (133 octal). The
// start-of-packet flag must travel with its bit, and no symbol may be lost
// or repeated under back-pressure.
module tb_conv_encoder;
  logic       clk = 0, rst = 1;
  logic       in_bit = 0, in_sop = 0, in_valid = 0, in_ready;
  logic [1:0] sym;
  logic       sym_sop, sym_valid, sym_ready = 0;
  int checks = 0, failures = 0, stalls = 0;
  logic [2:0] expq [$];   // {c0, c1, sop}
  bit         u [$];

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ub(int d);   // input bit d positions back, 0 before start
    return (u.size() > d) ? u[u.size() - 1 - d] : 1'b0;
  endfunction

  initial begin
    int taken = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 20000; n++) begin
      in_valid  = 1'($urandom % 3 != 0);
      in_bit    = 1'($urandom);
      in_sop    = 1'($urandom % 50 == 0);
      sym_ready = 1'($urandom % 3 != 0);
      #1;
      if (sym_valid && !sym_ready) stalls++;
      if (sym_valid && sym_ready) begin
        checks++;
        if (expq.size() == 0 || {sym, sym_sop} != expq[0]) begin
          failures++;
          $display("FAIL symbol %0d", taken);
        end
        if (expq.size() > 0) void'(expq.pop_front());
        taken++;
      end
      if (in_valid && in_ready) begin
        u.push_back(in_bit);
        expq.push_back({ub(0) ^ ub(1) ^ ub(2) ^ ub(3) ^ ub(6),
                        ub(0) ^ ub(2) ^ ub(3) ^ ub(5) ^ ub(6), in_sop});
      end
      @(negedge clk);
    end
    checks++;
    if (taken < 5000 || stalls == 0 || expq.size() > 1) begin
      failures++;
      $display("FAIL throughput: taken=%0d stalls=%0d left=%0d", taken, stalls, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
