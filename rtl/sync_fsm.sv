// sync_fsm - control state machine of the baseband processor: finds the
// SyncPattern in the chip stream, starts the Manchester decoding and collects
// the data message.
//
// How it works. In SEARCH the last SYNC_LEN decided chips are kept in a shift
// register and compared with SYNC_PATTERN after every chip. A match moves the
// machine to DATA and issues a one-clock start pulse to the Manchester
// decoder, which then takes the next chip as the first chip of the first data
// bit. In DATA the decoded bits are shifted in, first bit into the most
// significant position. After MSG_BITS bits the message is presented on
// msg_data with a msg_valid pulse, the decoder gets a stop pulse, the chip
// history is cleared and the machine returns to SEARCH. A code_err pulse
// from a chip-pair Manchester decoder (an invalid chip pair) during DATA
// drops the message the same way, without msg_valid. Detecting the
// SyncPattern and then starting the decoding, and the 8-bit message length,
// follow the design. The pattern itself, the bit order, dropping the message
// on a code error and the return to SEARCH after one message are this
// design's own choices.
//
// Interface:
//   chip, chip_valid     chip stream from the chip detector
//   bit_in, bit_valid    bit stream from the Manchester decoder
//   code_err             pulse: the decoder met an invalid chip pair
//   start, stop          registered one-clock pulses to the decoder
//   sync_found           registered pulse when the SyncPattern is detected
//   in_message           high while the message bits are collected
//   msg_data, msg_valid  received message and its one-clock strobe
// Timing: start follows the last SyncPattern chip's chip_valid by one clock;
// msg_valid follows the last bit_valid by one clock.
module sync_fsm #(
  parameter int unsigned                SYNC_LEN     = lf_rx_pkg::SYNC_LEN,
  parameter logic [SYNC_LEN-1:0]        SYNC_PATTERN = lf_rx_pkg::SYNC_PATTERN,
  parameter int unsigned                MSG_BITS     = lf_rx_pkg::MSG_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                chip,
  input  logic                chip_valid,
  input  logic                bit_in,
  input  logic                bit_valid,
  input  logic                code_err,
  output logic                start,
  output logic                stop,
  output logic                sync_found,
  output logic                in_message,
  output logic [MSG_BITS-1:0] msg_data,
  output logic                msg_valid
);

  localparam int unsigned BW = $clog2(MSG_BITS + 1);

  typedef enum logic {SEARCH = 1'b0, DATA = 1'b1} fsm_state_e;

  fsm_state_e          state;
  logic [SYNC_LEN-2:0] chip_hist;   // previous SYNC_LEN-1 chips
  logic [MSG_BITS-2:0] bit_sr;      // previous bits of the message
  logic [BW-1:0]       bit_cnt;
  logic [SYNC_LEN-1:0] hist_next;
  logic [MSG_BITS-1:0] bits_next;

  assign hist_next  = {chip_hist[SYNC_LEN-2:0], chip};
  assign bits_next  = {bit_sr[MSG_BITS-2:0], bit_in};
  assign in_message = (state == DATA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= SEARCH;
      chip_hist  <= '0;
      bit_sr     <= '0;
      bit_cnt    <= '0;
      start      <= 1'b0;
      stop       <= 1'b0;
      sync_found <= 1'b0;
      msg_valid  <= 1'b0;
      msg_data   <= '0;
    end else begin
      start      <= 1'b0;
      stop       <= 1'b0;
      sync_found <= 1'b0;
      msg_valid  <= 1'b0;
      unique case (state)
        SEARCH: begin
          if (chip_valid) begin
            chip_hist <= hist_next[SYNC_LEN-2:0];
            if (hist_next == SYNC_PATTERN) begin
              state      <= DATA;
              start      <= 1'b1;
              sync_found <= 1'b1;
              bit_cnt    <= '0;
            end
          end
        end
        DATA: begin
          if (code_err) begin
            stop      <= 1'b1;
            chip_hist <= '0;
            state     <= SEARCH;
          end else if (bit_valid) begin
            bit_sr <= bits_next[MSG_BITS-2:0];
            if (bit_cnt == BW'(MSG_BITS - 1)) begin
              msg_data  <= bits_next;
              msg_valid <= 1'b1;
              stop      <= 1'b1;
              chip_hist <= '0;
              state     <= SEARCH;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
