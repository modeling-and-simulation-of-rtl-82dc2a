// corr_md - Correlation Manchester Decoder (CorrMD): decides whole Manchester
// bits by correlating over both chips of a bit symbol.
//
// How it works. A corr_cd instance keeps the chip timing in phase with the
// input and still delivers the chip stream, which the SyncPattern search
// needs. In addition a reference toggle ref_chip flips at every chip
// boundary, so it alternates like the chips of a Manchester symbol. The bit
// correlator y, an up/down counter saturating at +/-2*CHIP_LEN (twice the chip
// correlator's range), adds +1 when a sample equals the reference of the chip
// it belongs to and -1 otherwise. When decoding starts (start pulse from the
// controlling state machine, given during the first data chip) the current
// reference value is stored as ref_start. From then on every second chip
// boundary closes a bit: the bit correlator has matched the chip pair
// (ref_start, ~ref_start), and the bit is (y >= 0) XOR ref_start, which maps
// the pair Zero-One to a One and One-Zero to a Zero (inverted Manchester
// code). Until decoding runs the bit correlator restarts at every chip
// boundary, so the first data bit starts cleanly. The bit correlator, the
// reference toggle and the stored start phase follow the design. Comparing
// the first sample after a boundary with the reference of the new chip, the
// bit_valid strobe and the stop input are this design's own choices.
//
// Interface:
//   din                      sample stream, one per clock
//   start                    pulse: decoding begins with the current chip
//   stop                     pulse: decoding ends (message complete)
//   chip, chip_valid         chip stream from the embedded CorrCD
//   data_clk                 CorrCD chip clock
//   bit_out, bit_valid       decoded bit and its one-clock strobe
//   adj_longer, adj_shorter  CorrCD phase corrections (status)
// Timing: bit_out/bit_valid are registered, one clock after the last sample
// of the bit's second chip; one bit every 20 to 24 clocks.
module corr_md #(
  parameter int unsigned CHIP_LEN = lf_rx_pkg::CHIP_LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic start,
  input  logic stop,
  output logic chip,
  output logic chip_valid,
  output logic data_clk,
  output logic bit_out,
  output logic bit_valid,
  output logic adj_longer,
  output logic adj_shorter
);

  localparam int unsigned YW   = $clog2(2 * CHIP_LEN + 1) + 1;
  localparam logic signed [YW-1:0] YMAX = YW'(2 * CHIP_LEN);

  logic chip_end;

  corr_cd #(.CHIP_LEN(CHIP_LEN)) u_cd (
    .clk, .rst_n, .din,
    .chip, .chip_valid, .data_clk,
    .chip_end, .adj_longer, .adj_shorter
  );

  logic                 ref_chip;    // reference value of the current chip
  logic                 ref_start;   // reference of a bit's first chip
  logic                 run;         // decoding active
  logic signed [YW-1:0] y;           // bit correlator

  logic ref_now;   // reference of the chip the current sample belongs to
  logic bit_end;   // this boundary closes a bit's second chip
  logic restart;   // bit correlator restarts with this sample

  always_comb begin
    ref_now = chip_end ? ~ref_chip : ref_chip;
    bit_end = chip_end && run && (ref_chip == ~ref_start);
    restart = chip_end && (bit_end || !run);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_chip <= 1'b0;
    else if (chip_end) ref_chip <= ~ref_chip;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run       <= 1'b0;
      ref_start <= 1'b0;
    end else if (stop) begin
      run <= 1'b0;
    end else if (start) begin
      run       <= 1'b1;
      ref_start <= ref_now;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
    end else if (restart) begin
      y <= (din == ref_now) ? YW'(1) : -YW'(1);
    end else if (din == ref_now) begin
      if (y < YMAX) y <= y + 1'b1;
    end else begin
      if (y > -YMAX) y <= y - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= bit_end;
      if (bit_end) bit_out <= (y >= 0) ^ ref_start;
    end
  end

endmodule
