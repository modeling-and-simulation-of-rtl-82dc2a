// orig_cd - transition-triggered chip detector of the original receiver: takes
// one sample per chip, near the middle of the chip, timed from the last
// level change of the sample stream.
//
// How it works. A flip-flop holds the previous sample, so an XOR with the
// current sample flags a transition, i.e. the first sample of a new chip. A
// transition loads a down counter so that it reaches zero PRESET samples
// later (five for eleven-sample chips: the sixth sample, the middle of the
// chip). When the counter reaches zero the current sample is taken as the
// chip value and the counter is reloaded to reach zero again CHIP_LEN
// samples later, the middle of the next chip if no transition comes. A
// transition before that restarts the count from PRESET, so every level
// change re-times the sampling. A transition has priority over taking a
// sample on the same clock. The detector has no averaging: a single wrong
// sample taken at the counter's zero gives a wrong chip, and a single
// wrong sample elsewhere moves the sampling point. The XOR transition
// detector, the preset of five, the reload with the chip length and the
// restart on every transition follow the design. The reset state (counter
// loaded as after a sample, so a chip is taken every CHIP_LEN clocks even
// without transitions), the chip_valid strobe and the data_clk toggle are
// this design's own choices.
//
// Interface:
//   din          sampled (optionally filtered) LFRAW, one sample per clock
//   chip         chip value, registered, valid from chip_valid on
//   chip_valid   one-clock pulse after each sample taken
//   data_clk     chip clock, toggles with each sample taken
// Timing: chip and chip_valid appear one clock after the sample taken, which
// is PRESET clocks after the first sample of a chip.
module orig_cd #(
  parameter int unsigned CHIP_LEN = lf_rx_pkg::CHIP_LEN,
  parameter int unsigned PRESET   = CHIP_LEN / 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic chip,
  output logic chip_valid,
  output logic data_clk
);

  localparam int unsigned CW = $clog2(CHIP_LEN);

  logic          prev;
  logic [CW-1:0] cnt;       // clocks left until the next sample is taken
  logic          trans;

  assign trans = din ^ prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= 1'b0;
      cnt        <= CW'(CHIP_LEN - 1);
      chip       <= 1'b0;
      chip_valid <= 1'b0;
      data_clk   <= 1'b0;
    end else begin
      prev       <= din;
      chip_valid <= 1'b0;
      if (trans) begin
        cnt <= CW'(PRESET - 1);
      end else if (cnt == '0) begin
        cnt        <= CW'(CHIP_LEN - 1);
        chip       <= din;
        chip_valid <= 1'b1;
        data_clk   <= ~data_clk;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
