// event_fifo: transmit queue of time-stamped spike records.
//
// A circular buffer of DEPTH records. Records are pushed one per clock with
// wr_en and popped with a valid/ready handshake on the read side. overflow is
// high while the fill level is OVF_LEVEL or more; feature extraction then
// sends only the extremes of each spike to lighten the load on the link. A
// record pushed into a full queue is dropped and counted in drop_count. The
// queue and its overflow signal follow the source design; the depth, the
// overflow level, the drop policy and the handshake are choices of this
// implementation.
//
// Timing: rd_data shows the oldest record whenever rd_valid is high; it is
// removed on a clock edge where rd_valid and rd_ready are both high. A push
// and a pop may happen on the same edge. level counts the stored records.
// Reset is asynchronous and active high and empties the queue.
module event_fifo
  import neural_dsp_pkg::*;
#(
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned OVF_LEVEL = 6,
  localparam int unsigned AW       = $clog2(DEPTH),
  localparam int unsigned LW       = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  event_rec_t    wr_data,
  input  logic          wr_en,
  output event_rec_t    rd_data,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [LW-1:0] level,
  output logic          overflow,
  output logic [15:0]   drop_count
);

  event_rec_t    mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          push, pop;

  assign pop  = rd_valid && rd_ready;
  assign push = wr_en && (level != LW'(DEPTH));

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      level      <= '0;
      drop_count <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      level <= level + LW'(push) - LW'(pop);
      if (wr_en && !push) drop_count <= drop_count + 1'b1;
    end
  end

  assign rd_data  = mem[rd_ptr];
  assign rd_valid = (level != '0);
  assign overflow = (level >= LW'(OVF_LEVEL));

endmodule
