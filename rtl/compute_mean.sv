// compute_mean: block-average estimate of the signal mean (offset).
//
// The chain removes the amplifier and ADC offset by subtracting the signal
// mean; the block that estimates it is only named by the source design. This
// implementation uses the same scheme as the threshold generator: samples are
// summed over a window of 2**LOG2N samples, the sum is shifted right by LOG2N,
// and the result is held as the mean for the next window. Until the first
// window is complete the mean is INIT_MEAN (mid-scale). The window length and
// initial value are choices of this implementation.
//
// Timing: one sample per clock; mean changes on the clock edge that takes in
// the first sample of a new window. Reset is asynchronous and active high.
module compute_mean
  import neural_dsp_pkg::*;
#(
  parameter int unsigned LOG2N     = 14,
  parameter int unsigned INIT_MEAN = 512
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t data_in,
  output sample_t mean
);

  localparam int unsigned ACC_W = DATA_W + LOG2N;

  logic [ACC_W-1:0] acc;
  logic [LOG2N-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc  <= '0;
      cnt  <= '0;
      mean <= sample_t'(INIT_MEAN);
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) begin
        mean <= sample_t'((acc + ACC_W'(data_in)) >> LOG2N);
        acc  <= '0;
      end else begin
        acc  <= acc + ACC_W'(data_in);
      end
    end
  end

endmodule
