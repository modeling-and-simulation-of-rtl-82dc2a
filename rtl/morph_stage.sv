// morph_stage - one stage of the morphological 1-bit filter: a shift register
// of MASKSIZE flip-flops that performs a one-dimensional dilation or erosion
// with a structuring element of MASKSIZE Ones.
//
// Dilation (DILATE = 1): a One at the input loads the whole register with
// Ones; otherwise it shifts and a Zero fills the empty end. The output, the
// far end of the register, therefore stays One for MASKSIZE clocks after the
// last input One. Erosion (DILATE = 0) is the dual: a Zero clears the whole
// register, otherwise it shifts in a One, so the output is One only after
// MASKSIZE consecutive input Ones. This is the shift-register realisation the
// design gives; the module split is this design's own.
//
// Interface: clk, rst_n (asynchronous, clears the register), din, dout.
// Timing: dout is the last register bit (registered).
module morph_stage #(
  parameter int unsigned MASKSIZE = 3,
  parameter bit          DILATE   = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  logic [MASKSIZE-1:0] sr;  // sr[0] input end, sr[MASKSIZE-1] output end
  logic [MASKSIZE-1:0] shifted;

  if (MASKSIZE > 1) begin : g_shift
    assign shifted = {sr[MASKSIZE-2:0], ~DILATE};
  end else begin : g_single
    assign shifted = MASKSIZE'(~DILATE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              sr <= '0;
    else if (din == DILATE)  sr <= {MASKSIZE{DILATE}};
    else                     sr <= shifted;
  end

  assign dout = sr[MASKSIZE-1];

endmodule
