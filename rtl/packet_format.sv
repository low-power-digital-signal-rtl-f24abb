// packet_format: turn queued spike records into serial packets, and keep the
// radio off while the queue fills.
//
// Packets are sent most significant bit first as
//   SYNC (8'h7E) | minmax (1) | electrode ID (7) | time stamp (16) | samples
// where samples are the WIN window samples in time order (10 bits each) or,
// for a min/max record, the maximum then the minimum. A full packet is
// PKT_FULL_BITS = 192 bits, a min/max packet PKT_MINMAX_BITS = 52 bits.
//
// Radio power control: rf_on is low while the queue is filling. It goes high
// once TX_START records are queued, stays high while packets are sent, and
// drops again when the queue is empty and the last packet has left. Sending
// bursts instead of running the radio all the time is the power saving the
// source design proposes; the watermark, the packet layout and the bit
// handshake are choices of this implementation.
//
// Timing: a record is popped (rd_ready high for one clock) when rf_on is high
// and no packet is in progress; its first bit is offered on the next clock
// with bit_sop high. Each bit is held on bit_out while bit_valid is high and
// is consumed on an edge where bit_ready is also high. There is one idle
// clock between packets. Reset is asynchronous and active high.
module packet_format
  import neural_dsp_pkg::*;
#(
  parameter int unsigned TX_START = 4,  // queued records that wake the radio
  parameter int unsigned LW       = 4   // width of the queue level input
) (
  input  logic          clk,
  input  logic          rst,
  input  event_rec_t    rd_data,
  input  logic          rd_valid,
  output logic          rd_ready,
  input  logic [LW-1:0] level,
  output logic          rf_on,
  output logic          bit_out,
  output logic          bit_sop,
  output logic          bit_valid,
  input  logic          bit_ready,
  output logic [15:0]   pkt_count
);

  localparam int unsigned PW = PKT_FULL_BITS;
  localparam int unsigned BW = $clog2(PW + 1);

  logic [PW-1:0] sr;
  logic [BW-1:0] bits_left;
  logic          first;
  logic [PW-1:0] pkt;
  logic [BW-1:0] pkt_len;

  // Build the packet of the record at the head of the queue, left aligned.
  always_comb begin
    pkt = '0;
    pkt[PW-1 -: PKT_HDR_BITS] = {PKT_SYNC, rd_data.rec.minmax, rd_data.id, rd_data.ts};
    for (int i = 0; i < int'(WIN); i++) begin
      pkt[PW-1-PKT_HDR_BITS-i*DATA_W -: DATA_W] = rd_data.rec.samples[i];
    end
    pkt_len = rd_data.rec.minmax ? BW'(PKT_MINMAX_BITS) : BW'(PKT_FULL_BITS);
  end

  assign bit_valid = (bits_left != '0);
  assign bit_out   = sr[PW-1];
  assign bit_sop   = first;
  assign rd_ready  = rf_on && !bit_valid && rd_valid;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr        <= '0;
      bits_left <= '0;
      first     <= 1'b0;
      rf_on     <= 1'b0;
      pkt_count <= '0;
    end else begin
      if (!rf_on && level >= LW'(TX_START)) rf_on <= 1'b1;
      else if (rf_on && !bit_valid && !rd_valid) rf_on <= 1'b0;

      if (rd_ready) begin
        sr        <= pkt;
        bits_left <= pkt_len;
        first     <= 1'b1;
        pkt_count <= pkt_count + 1'b1;
      end else if (bit_valid && bit_ready) begin
        sr        <= sr << 1;
        bits_left <= bits_left - 1'b1;
        first     <= 1'b0;
      end
    end
  end

endmodule
