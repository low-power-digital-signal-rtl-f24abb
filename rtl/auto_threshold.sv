// auto_threshold: automatic spike threshold from the mean absolute deviation.
//
// Each sample has the running signal mean subtracted and its absolute value
// taken. The absolute values are summed over a window of N = 2**LOG2N samples.
// When a window is complete the sum is divided by N with a right shift and
// multiplied by K; the result is the threshold for the whole following window,
// and the accumulator restarts with the first sample of that window. No
// samples are buffered. In the first window after reset the threshold is the
// fixed value INIT_THRESHOLD. All of this follows the design it was written
// from, including N = 16384, K = 8 and the value 80 for the first window.
//
// Timing: one sample per clock. data_out / abs_out are data_in and
// |data_in - mean| registered once; threshold is the threshold that applies
// to the sample currently on abs_out, so the spike detector can compare the
// two directly. The new threshold appears together with the first sample of
// the window it applies to.
//
// Scan: all flip-flops form one scan chain. While scan_shift is high every
// clock shifts the chain by one bit (scan_in enters at the least significant
// end of the state vector, scan_out is its most significant bit) and normal
// operation is frozen. The chain order is the field order of state_t.
// Reset is asynchronous and active high (a choice of this implementation).
module auto_threshold
  import neural_dsp_pkg::*;
#(
  parameter int unsigned LOG2N          = 14,  // window N = 2**LOG2N samples
  parameter int unsigned K              = 8,   // threshold multiplier
  parameter int unsigned INIT_THRESHOLD = 80,  // threshold in the first window
  localparam int unsigned THR_W         = DATA_W + $clog2(K + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  sample_t          data_in,
  input  sample_t          mean,
  output sample_t          data_out,
  output sample_t          abs_out,
  output logic [THR_W-1:0] threshold,
  input  logic             scan_in,
  input  logic             scan_shift,
  output logic             scan_out
);

  localparam int unsigned ACC_W = DATA_W + LOG2N;

  typedef struct packed {
    logic [ACC_W-1:0] acc;        // sum of |x - mean| in the current window
    logic [LOG2N-1:0] cnt;        // sample index in the current window
    logic             full;       // acc holds a complete window
    logic [THR_W-1:0] thr;        // threshold for the sample on abs_out
    sample_t          data;
    sample_t          absv;
  } state_t;

  localparam int unsigned STATE_W = $bits(state_t);

  state_t q, d;

  logic signed [DATA_W:0] diff;
  sample_t                abs_in;
  logic [DATA_W-1:0]      avg;

  always_comb begin
    diff   = $signed({1'b0, data_in}) - $signed({1'b0, mean});
    abs_in = diff[DATA_W] ? sample_t'(-diff) : sample_t'(diff);
    avg    = DATA_W'(q.acc >> LOG2N);

    d      = q;
    d.data = data_in;
    d.absv = abs_in;
    d.cnt  = q.cnt + 1'b1;
    d.full = (q.cnt == '1);
    if (q.full) begin
      d.thr = THR_W'(avg) * THR_W'(K);
      d.acc = ACC_W'(abs_in);
    end else begin
      d.acc = q.acc + ACC_W'(abs_in);
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q     <= '0;
      q.thr <= THR_W'(INIT_THRESHOLD);
    end else if (scan_shift) begin
      q <= state_t'({STATE_W'(q) << 1} | STATE_W'(scan_in));
    end else begin
      q <= d;
    end
  end

  assign data_out  = q.data;
  assign abs_out   = q.absv;
  assign threshold = q.thr;
  assign scan_out  = q[STATE_W-1];

endmodule
