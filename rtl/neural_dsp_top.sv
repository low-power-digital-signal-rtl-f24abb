// neural_dsp_top: single-channel spike processing chain for an implanted
// neural recorder, from ADC samples to channel-coded symbols for the radio.
//
// Data flow, one 10-bit sample per clock:
//   compute_mean -> auto_threshold -> (threshold_select) -> spike_detect
//   -> feature_extract -> time_stamp -> event_fifo -> packet_format
//   -> conv_encoder -> symbols for the RF transmitter (outside this design).
// The mean is removed and a threshold is derived from the mean absolute
// deviation; samples whose deviation exceeds the threshold start a 16-sample
// window (4 samples before the crossing). Each window is stored whole, or as
// max/min only while the transmit queue is near full, stamped with time and
// electrode ID, queued, framed into a packet and convolutionally encoded. The
// radio enable rf_on stays low while the queue fills and the queue is sent in
// bursts. The order of blocks and the overflow feedback from the queue to
// feature extraction follow the source design's block diagram.
//
// The mean used can be the internal estimate or mean_in (use_ext_mean), and
// the threshold the generated one or a programmed one (use_ext_thr), as on
// the source design's test pins. data_out, data_valid_out and count_out are
// the spike detector's outputs. The scan chain runs scan_in ->
// auto_threshold -> spike_detect -> scan_out; scan_shift freezes and shifts
// those two blocks only. The transmitter takes a symbol when sym_ready is
// high. Reset is asynchronous and active high.
module neural_dsp_top
  import neural_dsp_pkg::*;
#(
  parameter int unsigned LOG2N          = 14,
  parameter int unsigned K              = 8,
  parameter int unsigned INIT_THRESHOLD = 80,
  parameter int unsigned MEAN_LOG2N     = 14,
  parameter int unsigned FIFO_DEPTH     = 8,
  parameter int unsigned OVF_LEVEL      = 6,
  parameter int unsigned TX_START       = 4,
  localparam int unsigned THR_W         = DATA_W + $clog2(K + 1),
  localparam int unsigned LW            = $clog2(FIFO_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  sample_t          data_in,
  input  logic [ID_W-1:0]  electrode_id,
  input  logic             use_ext_mean,
  input  sample_t          mean_in,
  input  logic             ext_thr_wr,
  input  logic [THR_W-1:0] ext_thr_value,
  input  logic             use_ext_thr,
  input  logic             scan_in,
  input  logic             scan_shift,
  output logic             scan_out,
  output sample_t          data_out,
  output logic             data_valid_out,
  output logic [CNT_W-1:0] count_out,
  output sample_t          mean_out,
  output logic [THR_W-1:0] threshold_out,
  output logic             overflow,
  output logic [LW-1:0]    fifo_level,
  output logic [15:0]      drop_count,
  output logic [15:0]      pkt_count,
  output logic             rf_on,
  output logic [1:0]       sym,
  output logic             sym_sop,
  output logic             sym_valid,
  input  logic             sym_ready
);

  sample_t          mean_est, mean_sel;
  sample_t          at_data, at_abs;
  logic [THR_W-1:0] at_thr;
  logic             scan_mid;
  spike_rec_t       rec;
  logic             rec_valid;
  event_rec_t       ev, head;
  logic             ev_valid, head_valid, head_ready;
  logic             pbit, psop, pvalid, pready;

  compute_mean #(.LOG2N(MEAN_LOG2N)) u_mean (
    .clk, .rst, .data_in, .mean(mean_est)
  );

  assign mean_sel = use_ext_mean ? mean_in : mean_est;
  assign mean_out = mean_sel;

  auto_threshold #(.LOG2N(LOG2N), .K(K), .INIT_THRESHOLD(INIT_THRESHOLD)) u_thr (
    .clk, .rst, .data_in, .mean(mean_sel),
    .data_out(at_data), .abs_out(at_abs), .threshold(at_thr),
    .scan_in, .scan_shift, .scan_out(scan_mid)
  );

  threshold_select #(.THR_W(THR_W)) u_sel (
    .clk, .rst, .ext_wr(ext_thr_wr), .ext_value(ext_thr_value),
    .use_ext(use_ext_thr), .auto_threshold(at_thr), .threshold(threshold_out)
  );

  spike_detect #(.THR_W(THR_W)) u_det (
    .clk, .rst, .data_in(at_data), .abs_in(at_abs), .threshold(threshold_out),
    .data_out, .data_valid(data_valid_out), .count_out,
    .scan_in(scan_mid), .scan_shift, .scan_out
  );

  feature_extract u_fx (
    .clk, .rst, .data_in(data_out), .data_valid(data_valid_out),
    .count_in(count_out), .overflow, .rec, .rec_valid
  );

  time_stamp u_ts (
    .clk, .rst, .electrode_id, .rec, .rec_valid, .ev, .ev_valid
  );

  event_fifo #(.DEPTH(FIFO_DEPTH), .OVF_LEVEL(OVF_LEVEL)) u_fifo (
    .clk, .rst, .wr_data(ev), .wr_en(ev_valid),
    .rd_data(head), .rd_valid(head_valid), .rd_ready(head_ready),
    .level(fifo_level), .overflow, .drop_count
  );

  packet_format #(.TX_START(TX_START), .LW(LW)) u_pkt (
    .clk, .rst, .rd_data(head), .rd_valid(head_valid), .rd_ready(head_ready),
    .level(fifo_level), .rf_on, .bit_out(pbit), .bit_sop(psop),
    .bit_valid(pvalid), .bit_ready(pready), .pkt_count
  );

  conv_encoder u_enc (
    .clk, .rst, .in_bit(pbit), .in_sop(psop), .in_valid(pvalid),
    .in_ready(pready), .sym, .sym_sop, .sym_valid, .sym_ready
  );

endmodule
