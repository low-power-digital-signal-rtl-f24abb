// neural_dsp_pkg: constants and record types shared by the single-channel
// neural spike processing chain.
//
// The sample width (10 bits), the 16-sample spike window and its 4 pre-trigger
// samples are the figures the chain is built around. The electrode ID width
// (7 bits, enough for a 10 x 10 electrode array), the 16-bit time stamp and the
// layout of the event record are choices of this implementation.
package neural_dsp_pkg;

  localparam int unsigned DATA_W = 10;  // ADC sample width
  localparam int unsigned WIN    = 16;  // samples per extracted spike window
  localparam int unsigned PRE    = 4;   // pre-trigger samples in a window
  localparam int unsigned CNT_W  = $clog2(WIN);
  localparam int unsigned ID_W   = 7;   // electrode ID (100 electrodes)
  localparam int unsigned TS_W   = 16;  // time stamp, in sample periods

  typedef logic [DATA_W-1:0] sample_t;

  // One extracted spike. In min/max mode only samples[0] (maximum) and
  // samples[1] (minimum) carry data; the rest are zero.
  typedef struct packed {
    logic                  minmax;
    sample_t [WIN-1:0]     samples;
  } spike_rec_t;

  // A spike record after time stamping: what the transmit queue holds.
  typedef struct packed {
    logic [ID_W-1:0]       id;
    logic [TS_W-1:0]       ts;
    spike_rec_t            rec;
  } event_rec_t;

  // Packet framing (serial, MSB first):
  //   SYNC(8) | minmax(1) | id(7) | ts(16) | samples (16 x 10, or max, min)
  localparam logic [7:0] PKT_SYNC      = 8'h7E;
  localparam int unsigned PKT_HDR_BITS = 8 + 1 + ID_W + TS_W;
  localparam int unsigned PKT_FULL_BITS   = PKT_HDR_BITS + WIN * DATA_W;
  localparam int unsigned PKT_MINMAX_BITS = PKT_HDR_BITS + 2 * DATA_W;

endpackage
