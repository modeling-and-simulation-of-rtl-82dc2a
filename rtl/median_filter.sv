// median_filter - MedianXFilter, the running median of FILTERSIZE one-bit
// samples.
//
// For binary samples the median is the majority, so no sorting is needed: a
// delay line of FILTERSIZE+1 flip-flops holds the recent samples and an
// up/down counter tracks how many Ones lie in a window of FILTERSIZE of them.
// The counter goes up when a One enters the window (first tap) and down when
// a One leaves it (last tap); equal taps leave it unchanged. The voter
// registers One when the count exceeds FILTERSIZE/2. This structure (delay
// line length, counter steering from first and last tap, voter) follows the
// design; FILTERSIZE must be odd. The default 7 is the filter the design
// recommends together with the Correlation Manchester Decoder.
//
// Interface: clk (90 kHz), rst_n (asynchronous, active low, clears the delay
// line and counter), din, dout.
// Timing: dout(n) is the majority of din over samples n-FILTERSIZE-2 ..
// n-3, i.e. the group delay is about FILTERSIZE/2 + 2 clocks.
module median_filter #(
  parameter int unsigned FILTERSIZE = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  localparam int unsigned CW = $clog2(FILTERSIZE + 1);

  logic [FILTERSIZE:0] dly;   // dly[0] newest sample
  logic [CW-1:0]       ones;  // Ones in dly[1..FILTERSIZE]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dly <= '0;
    else        dly <= {dly[FILTERSIZE-1:0], din};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ones <= '0;
    end else if (dly[0] && !dly[FILTERSIZE]) begin
      if (ones < CW'(FILTERSIZE)) ones <= ones + 1'b1;
    end else if (!dly[0] && dly[FILTERSIZE]) begin
      if (ones > '0) ones <= ones - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else        dout <= (ones > CW'(FILTERSIZE / 2));
  end

endmodule
