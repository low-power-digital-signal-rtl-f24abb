// spike_detect: threshold spike detector with a pre-trigger buffer.
//
// The absolute deviation of each sample is compared with the threshold. A
// PRE-sample shift register is always updated, so that when a sample exceeds
// the threshold the window sent on starts PRE samples before the crossing. On
// a detection a counter starts and WIN samples (PRE before the crossing, the
// crossing sample and WIN-PRE-1 after it) leave on data_out with data_valid
// high and count_out numbering them 0 .. WIN-1. A crossing during the last
// sample of a window starts the next window at once, with no idle cycle, so
// spikes that follow one another are all caught; crossings inside a running
// window belong to that window. The 4-sample buffer, the 16-sample window
// (the document's 1 ms), the valid flag and the 4-bit count follow the source
// design; the strict ">" comparison is this implementation's choice.
//
// Timing: one sample per clock. data_out always carries the input stream
// delayed by PRE+1 clocks; the window's first sample (count_out = 0) appears
// on the clock after the crossing sample was on abs_in.
//
// Scan: all flip-flops form one scan chain (scan_in at the least significant
// end of state_t, scan_out from the most significant bit); scan_shift high
// shifts the chain and freezes normal operation. Reset is asynchronous and
// active high.
module spike_detect
  import neural_dsp_pkg::*;
#(
  parameter int unsigned THR_W = 14  // threshold width (auto_threshold's)
) (
  input  logic             clk,
  input  logic             rst,
  input  sample_t          data_in,
  input  sample_t          abs_in,
  input  logic [THR_W-1:0] threshold,
  output sample_t          data_out,
  output logic             data_valid,
  output logic [CNT_W-1:0] count_out,
  input  logic             scan_in,
  input  logic             scan_shift,
  output logic             scan_out
);

  typedef struct packed {
    sample_t [PRE-1:0] pre;      // pre[0] newest, pre[PRE-1] oldest
    sample_t           data;
    logic              valid;
    logic [CNT_W-1:0]  cnt;
  } state_t;

  localparam int unsigned STATE_W = $bits(state_t);

  state_t q, d;
  logic   hit, idle;

  always_comb begin
    hit  = THR_W'(abs_in) > threshold;
    // free to start a window: none running, or the running one ends now
    idle = !q.valid || (q.cnt == CNT_W'(WIN - 1));

    d        = q;
    d.pre[0] = data_in;
    for (int i = 1; i < PRE; i++) d.pre[i] = q.pre[i-1];
    d.data   = q.pre[PRE-1];
    if (idle) begin
      d.valid = hit;
      d.cnt   = '0;
    end else begin
      d.cnt   = q.cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q <= '0;
    end else if (scan_shift) begin
      q <= state_t'({STATE_W'(q) << 1} | STATE_W'(scan_in));
    end else begin
      q <= d;
    end
  end

  assign data_out   = q.data;
  assign data_valid = q.valid;
  assign count_out  = q.cnt;
  assign scan_out   = q[STATE_W-1];

endmodule
