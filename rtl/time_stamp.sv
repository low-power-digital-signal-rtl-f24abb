// time_stamp: tag each extracted spike record with its time and electrode.
//
// A free-running counter advances once per sample clock from reset. When a
// record arrives it is stored together with the counter value and the
// electrode ID and passed on to the transmit queue. The counter width
// (TS_W = 16 bits, wrapping) and the choice to stamp the time at which the
// record is complete, rather than the time of the threshold crossing, are
// choices of this implementation; the crossing happened a fixed number of
// sample clocks earlier.
//
// Timing: ev_valid is a one-clock pulse on the clock after rec_valid; ev.ts
// is the counter value on the clock where rec_valid was high. The counter
// reads 0 on the first clock after reset. Reset is asynchronous, active high.
module time_stamp
  import neural_dsp_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [ID_W-1:0] electrode_id,
  input  spike_rec_t      rec,
  input  logic            rec_valid,
  output event_rec_t      ev,
  output logic            ev_valid
);

  logic [TS_W-1:0] now;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      now      <= '0;
      ev       <= '0;
      ev_valid <= 1'b0;
    end else begin
      now      <= now + 1'b1;
      ev_valid <= rec_valid;
      if (rec_valid) begin
        ev.id  <= electrode_id;
        ev.ts  <= now;
        ev.rec <= rec;
      end
    end
  end

endmodule
