// count_filter - CountXFilter, a 1-bit noise filter built from one saturating
// up/down counter and a threshold voter.
//
// Every sample clock the counter c moves up by one when the input sample is
// One and down by one when it is Zero, saturating at 0 and MAXCOUNT, so a
// noise spike only nudges it. The voter registers y = 1 when
// c >= MAXCOUNT/2 (evaluated as 2*c >= MAXCOUNT), y = 0 otherwise. The counter
// limits, the update rule and the threshold follow the design; the reset value
// MAXCOUNT/2 (rounded down) and the registered output also follow it. The
// default MAXCOUNT = 3 is the counting filter that suits the correlation
// decoders best; MAXCOUNT = 5 is the best one in front of a simple chip
// detector.
//
// Interface: clk (90 kHz sample clock), rst_n (asynchronous, active low),
// din (sampled LFRAW), dout (filtered sample).
// Timing: dout is registered; it follows a steady input after roughly
// MAXCOUNT/2 + 1 clocks.
module count_filter #(
  parameter int unsigned MAXCOUNT = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  localparam int unsigned CW = $clog2(MAXCOUNT + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= CW'(MAXCOUNT / 2);
    end else if (din) begin
      if (cnt < CW'(MAXCOUNT)) cnt <= cnt + 1'b1;
    end else begin
      if (cnt > '0) cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else        dout <= ({1'b0, cnt, 1'b0} >= (CW + 2)'(MAXCOUNT));
  end

endmodule
