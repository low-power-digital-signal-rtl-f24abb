// tb_threshold_select: self-checking test of the threshold source selection.
//
// Checks the reset value of the programmed threshold (all ones), that a write
// takes effect only with ext_wr, and that use_ext picks between the
// programmed and the generated threshold, over random values.
module tb_threshold_select;
  localparam int unsigned THR_W = 14;

  logic             clk = 0, rst = 1, ext_wr = 0, use_ext = 0;
  logic [THR_W-1:0] ext_value = '0, auto_threshold = '0, threshold;
  logic [THR_W-1:0] model;
  int checks = 0, failures = 0;

  threshold_select #(.THR_W(THR_W)) dut (.*);

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
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    use_ext = 1;
    #1 check(threshold == '1, "programmed threshold resets to maximum");
    model = '1;
    for (int i = 0; i < 500; i++) begin
      ext_wr         = 1'($urandom % 3 == 0);
      ext_value      = THR_W'($urandom);
      auto_threshold = THR_W'($urandom);
      use_ext        = 1'($urandom);
      #1 check(threshold == (use_ext ? model : auto_threshold), $sformatf("select at %0d", i));
      @(negedge clk);
      if (ext_wr) model = ext_value;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
