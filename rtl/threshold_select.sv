// threshold_select: user-programmable threshold and threshold source select.
//
// Spike detection can use either the automatically generated threshold or a
// threshold set by the user. The user value is held in a register written
// when ext_wr is high; use_ext selects it in place of the generated one. The
// selection itself follows the source design; the write strobe, the register
// and its reset value (the maximum, so that nothing is detected until it is
// programmed) are choices of this implementation.
//
// Timing: the register takes ext_value on the clock edge where ext_wr is
// high; the output is combinational in use_ext and the two thresholds.
module threshold_select #(
  parameter int unsigned THR_W = 14
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ext_wr,
  input  logic [THR_W-1:0] ext_value,
  input  logic             use_ext,
  input  logic [THR_W-1:0] auto_threshold,
  output logic [THR_W-1:0] threshold
);

  logic [THR_W-1:0] ext_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         ext_q <= '1;
    else if (ext_wr) ext_q <= ext_value;
  end

  assign threshold = use_ext ? ext_q : auto_threshold;

endmodule
