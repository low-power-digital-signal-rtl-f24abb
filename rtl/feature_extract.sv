// feature_extract: capture a detected spike window, or only its extremes.
//
// The spike detector delivers each window as WIN samples with data_valid high
// and count_in numbering them. This block stores the samples and keeps the
// running maximum and minimum. When the last sample (count_in = WIN-1)
// arrives it emits one record: all WIN samples normally, or, when the transmit
// queue reports overflow at that moment, only the maximum (samples[0]) and the
// minimum (samples[1]), with the minmax flag set. Keeping the whole window,
// and falling back to max/min on overflow, is what the source design asks of
// this block; sampling the overflow flag at the end of the window and the
// record layout are choices of this implementation.
//
// Timing: rec_valid is a one-clock pulse on the clock after the last sample
// of a window was on data_in. Windows may follow back to back.
// Reset is asynchronous and active high.
module feature_extract
  import neural_dsp_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  sample_t          data_in,
  input  logic             data_valid,
  input  logic [CNT_W-1:0] count_in,
  input  logic             overflow,
  output spike_rec_t       rec,
  output logic             rec_valid
);

  sample_t [WIN-1:0] win_q;
  sample_t           max_q, min_q;
  sample_t           max_n, min_n;

  always_comb begin
    if (count_in == '0) begin
      max_n = data_in;
      min_n = data_in;
    end else begin
      max_n = (data_in > max_q) ? data_in : max_q;
      min_n = (data_in < min_q) ? data_in : min_q;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      win_q     <= '0;
      max_q     <= '0;
      min_q     <= '0;
      rec       <= '0;
      rec_valid <= 1'b0;
    end else begin
      rec_valid <= 1'b0;
      if (data_valid) begin
        win_q[count_in] <= data_in;
        max_q           <= max_n;
        min_q           <= min_n;
        if (count_in == CNT_W'(WIN - 1)) begin
          rec_valid <= 1'b1;
          if (overflow) begin
            rec            <= '0;
            rec.minmax     <= 1'b1;
            rec.samples[0] <= max_n;
            rec.samples[1] <= min_n;
          end else begin
            rec.minmax            <= 1'b0;
            rec.samples           <= win_q;
            rec.samples[WIN-1]    <= data_in;
          end
        end
      end
    end
  end

endmodule
