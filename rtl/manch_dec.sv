// manch_dec - chip-pair Manchester decoder: turns a stream of decided chips
// into bits by checking each pair of chips against the two allowed
// patterns.
//
// How it works. A start pulse (from the SyncPattern state machine, after the
// last pattern chip) marks the next chip as the first chip of a bit. From
// then on chips are taken in pairs: the first is stored, and with the second
// the pair is decoded. Zero-One gives a One, One-Zero gives a Zero (inverted
// Manchester code; the bit equals the second chip). Zero-Zero and One-One
// are not Manchester symbols: the decoder reports a code error instead of a
// bit. A stop pulse ends the decoding. The pairing of chips after the
// SyncPattern, the two patterns and the detection of invalid pairs follow
// the design. The start and stop inputs and the strobes are this design's
// own choices. What happens after a code error is left to the state machine
// (here it drops the message).
//
// Interface:
//   chip, chip_valid     chip stream from a chip detector
//   start, stop          one-clock pulses: begin / end decoding
//   bit_out, bit_valid   decoded bit and its one-clock strobe
//   code_err             one-clock pulse: the chip pair was not Manchester
// Timing: bit_out/bit_valid or code_err are registered, one clock after the
// chip_valid of the bit's second chip.
module manch_dec (
  input  logic clk,
  input  logic rst_n,
  input  logic chip,
  input  logic chip_valid,
  input  logic start,
  input  logic stop,
  output logic bit_out,
  output logic bit_valid,
  output logic code_err
);

  logic run;        // decoding active
  logic second;     // the next chip is the second chip of a bit
  logic first_chip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= 1'b0;
      second     <= 1'b0;
      first_chip <= 1'b0;
      bit_out    <= 1'b0;
      bit_valid  <= 1'b0;
      code_err   <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      code_err  <= 1'b0;
      if (stop) begin
        run <= 1'b0;
      end else if (start) begin
        run    <= 1'b1;
        second <= 1'b0;
      end else if (run && chip_valid) begin
        second <= ~second;
        if (!second) begin
          first_chip <= chip;
        end else if (first_chip != chip) begin
          bit_out   <= chip;
          bit_valid <= 1'b1;
        end else begin
          code_err  <= 1'b1;
        end
      end
    end
  end

endmodule
