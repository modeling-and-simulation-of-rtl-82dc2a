// lf_dbp_top - digital baseband processor of the 125 kHz on-off-keyed wake-up
// receiver: sampling, 1-bit noise filter, chip detection and Manchester
// decoding, SyncPattern state machine.
//
// How it works. The analog front end delivers LFRAW, the binary output of its
// data comparator. The first flip-flop samples it with the 90 kHz processing
// clock, so a chip (8 kchip/s) spans about eleven samples. The sample stream
// goes through all four 1-bit noise filters (CountXFilter, HystXFilter,
// MedianXFilter, MOXFilter) in parallel; filter_sel picks which output (or
// the unfiltered samples) feeds the decoder. The DECODER parameter selects
// one of three decoder chains:
//   DEC_CORRMD  Correlation Manchester Decoder (default, recommended): bits
//               are decided by correlating over whole Manchester symbols;
//   DEC_CORRCD  Correlation Chip Detector, then chip-pair Manchester decoder;
//   DEC_ORIG    the original transition-triggered chip detector, then the
//               chip-pair Manchester decoder.
// The chip stream is searched for the SyncPattern by sync_fsm, which then
// starts bit decoding and gathers the 8-bit message. The chain (sampling,
// filter, chip detection and Manchester decoding, SyncPattern FSM), the
// three decoder variants and the filter sizes follow the design, which
// recommends the MedianXFilter of length 7 with the CorrMD; the other sizes
// are the ones it found best in front of the correlation decoders. Having
// all filters present and choosing one at run time is this design's own
// choice; a product would keep only the selected filter (set filter_sel
// constant and let synthesis remove the rest).
//
// Interface:
//   clk                      90 kHz sample clock
//   rst_n                    asynchronous reset, active low
//   lfraw                    comparator output of the analog front end
//   filter_sel               noise filter in use (lf_rx_pkg::filt_sel_e)
//   chip, chip_valid         recovered chips and their strobe
//   data_clk                 recovered chip clock
//   bit_out, bit_valid       decoded Manchester bits and their strobe
//   sync_found               pulse: SyncPattern detected
//   in_message               high while message bits are collected
//   msg_data, msg_valid      received message, MSB = first bit
//   adj_longer, adj_shorter  pulses: chip period lengthened / shortened
//                            (always low with DEC_ORIG)
// Timing: sampling adds one clock, each filter a few clocks (see the filter
// modules), the decoder one clock after each chip or bit, two with the
// chip-pair decoder.
module lf_dbp_top #(
  parameter int unsigned CHIP_LEN       = lf_rx_pkg::CHIP_LEN,
  parameter int unsigned COUNT_MAX      = 3,
  parameter int unsigned HYST_STATESIZE = 1,
  parameter int unsigned MEDIAN_SIZE    = 7,
  parameter int unsigned MO_MASKSIZE    = 3,
  parameter lf_rx_pkg::dec_sel_e DECODER = lf_rx_pkg::DEC_CORRMD
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                lfraw,
  input  lf_rx_pkg::filt_sel_e filter_sel,
  output logic                chip,
  output logic                chip_valid,
  output logic                data_clk,
  output logic                bit_out,
  output logic                bit_valid,
  output logic                sync_found,
  output logic                in_message,
  output logic [lf_rx_pkg::MSG_BITS-1:0] msg_data,
  output logic                msg_valid,
  output logic                adj_longer,
  output logic                adj_shorter
);

  // sampling flip-flop for the asynchronous comparator output
  logic sample;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample <= 1'b0;
    else        sample <= lfraw;
  end

  logic f_count, f_hyst, f_median, f_mo, filtered;

  count_filter  #(.MAXCOUNT(COUNT_MAX))        u_count  (.clk, .rst_n, .din(sample), .dout(f_count));
  hyst_filter   #(.STATESIZE(HYST_STATESIZE))  u_hyst   (.clk, .rst_n, .din(sample), .dout(f_hyst));
  median_filter #(.FILTERSIZE(MEDIAN_SIZE))    u_median (.clk, .rst_n, .din(sample), .dout(f_median));
  mo_filter     #(.MASKSIZE(MO_MASKSIZE))      u_mo     (.clk, .rst_n, .din(sample), .dout(f_mo));

  always_comb begin
    unique case (filter_sel)
      lf_rx_pkg::FILT_COUNT:  filtered = f_count;
      lf_rx_pkg::FILT_HYST:   filtered = f_hyst;
      lf_rx_pkg::FILT_MEDIAN: filtered = f_median;
      lf_rx_pkg::FILT_MO:     filtered = f_mo;
      default:     filtered = sample;
    endcase
  end

  logic dec_start, dec_stop, code_err;

  generate
    if (DECODER == lf_rx_pkg::DEC_CORRMD) begin : g_corr_md
      corr_md #(.CHIP_LEN(CHIP_LEN)) u_corr_md (
        .clk, .rst_n,
        .din        (filtered),
        .start      (dec_start),
        .stop       (dec_stop),
        .chip, .chip_valid, .data_clk,
        .bit_out, .bit_valid,
        .adj_longer, .adj_shorter
      );
      assign code_err = 1'b0;
    end else begin : g_chip_pair
      if (DECODER == lf_rx_pkg::DEC_CORRCD) begin : g_corr_cd
        logic chip_end_unused;   // only the CorrMD needs the chip boundary
        corr_cd #(.CHIP_LEN(CHIP_LEN)) u_corr_cd (
          .clk, .rst_n,
          .din        (filtered),
          .chip, .chip_valid, .data_clk,
          .chip_end   (chip_end_unused),
          .adj_longer, .adj_shorter
        );
      end else begin : g_orig_cd
        orig_cd #(.CHIP_LEN(CHIP_LEN)) u_orig_cd (
          .clk, .rst_n,
          .din        (filtered),
          .chip, .chip_valid, .data_clk
        );
        assign adj_longer  = 1'b0;
        assign adj_shorter = 1'b0;
      end
      manch_dec u_manch_dec (
        .clk, .rst_n,
        .chip, .chip_valid,
        .start      (dec_start),
        .stop       (dec_stop),
        .bit_out, .bit_valid,
        .code_err
      );
    end
  endgenerate

  sync_fsm u_fsm (
    .clk, .rst_n,
    .chip, .chip_valid,
    .bit_in     (bit_out),
    .bit_valid,
    .code_err,
    .start      (dec_start),
    .stop       (dec_stop),
    .sync_found,
    .in_message,
    .msg_data,
    .msg_valid
  );

endmodule
