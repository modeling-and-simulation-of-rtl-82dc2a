// lf_rx_pkg - shared types and constants of the LF wake-up receiver's digital
// baseband processor.
//
// The receiver samples the binary comparator output LFRAW at 90 kHz. Chips
// are sent at twice the 4 kbaud data rate, so one chip spans about eleven
// samples (90 kHz / 8 kchip/s = 11.25); CHIP_LEN is that nominal length and
// sets the counter ranges of the correlators. A data message carries eight
// bits. The SyncPattern chip sequence and its length are this design's own
// choice. However its chips are grouped into pairs, at least one pair holds
// two equal chips, so it cannot occur in Manchester-coded data or in the
// alternating preamble; the preamble needs three wrong chips to imitate it.
// Like data, it has no run longer than two equal chips (also where it meets
// the preamble and the message), so the front end's averaging threshold does
// not drift further on it than on data.
package lf_rx_pkg;

  // Nominal samples per chip at 90 kHz sampling and 8 kchip/s.
  localparam int unsigned CHIP_LEN = 11;
  // Data bits per wake-up message.
  localparam int unsigned MSG_BITS = 8;
  // SyncPattern: chips in transmission order, leftmost first.
  localparam int unsigned SYNC_LEN = 8;
  localparam logic [SYNC_LEN-1:0] SYNC_PATTERN = 8'b0100_1001;

  // Selection of the 1-bit noise filter placed in front of the decoder.
  typedef enum logic [2:0] {
    FILT_NONE   = 3'd0,  // LFRAW samples passed on unfiltered
    FILT_COUNT  = 3'd1,  // CountXFilter
    FILT_HYST   = 3'd2,  // HystXFilter
    FILT_MEDIAN = 3'd3,  // MedianXFilter (recommended with the CorrMD)
    FILT_MO     = 3'd4   // MOXFilter
  } filt_sel_e;

  // Chip detection and Manchester decoding used by the top (a build-time
  // choice).
  typedef enum logic [1:0] {
    DEC_CORRMD = 2'd0,  // Correlation Manchester Decoder (recommended)
    DEC_CORRCD = 2'd1,  // Correlation Chip Detector + chip-pair decoder
    DEC_ORIG   = 2'd2   // transition chip detector + chip-pair decoder
  } dec_sel_e;

endpackage
