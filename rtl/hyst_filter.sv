// hyst_filter - HystXFilter, a counting 1-bit noise filter whose voter has
// hysteresis.
//
// A saturating up/down counter c runs over 0 .. 3*STATESIZE-1 (up on a One
// sample, down on a Zero sample). Its range is split into three bands of
// STATESIZE values. A two-state Moore machine (LOW/HIGH) moves to HIGH when
// c >= 2*STATESIZE and to LOW when c <= STATESIZE-1, and keeps its state in
// the middle band; the output is the state. Counter range, thresholds and the
// Moore voter follow the design. Resetting the counter to the middle of its
// range and the voter to LOW also follows it. The default STATESIZE = 1 is
// the hysteresis filter that suits the correlation decoders best; STATESIZE
// = 2 is the best in front of a simple chip detector.
//
// Interface: clk (90 kHz), rst_n (asynchronous, active low), din, dout.
// Timing: the state register is the output, one clock after the counter value
// that caused the transition.
module hyst_filter #(
  parameter int unsigned STATESIZE = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  localparam int unsigned CMAX = 3 * STATESIZE - 1;
  localparam int unsigned CW   = (CMAX < 1) ? 1 : $clog2(CMAX + 1);

  typedef enum logic {LOW = 1'b0, HIGH = 1'b1} hyst_state_e;

  logic [CW-1:0] cnt;
  hyst_state_e   state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= CW'((3 * STATESIZE) / 2);
    end else if (din) begin
      if (cnt < CW'(CMAX)) cnt <= cnt + 1'b1;
    end else begin
      if (cnt > '0) cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LOW;
    end else begin
      unique case (state)
        LOW:  if (cnt >= CW'(2 * STATESIZE)) state <= HIGH;
        HIGH: if (cnt <= CW'(STATESIZE - 1)) state <= LOW;
      endcase
    end
  end

  assign dout = (state == HIGH);

endmodule
