// mo_filter - MOXFilter, a 1-bit noise filter from mathematical morphology.
//
// The sampled LFRAW stream is treated as a one-dimensional binary image. An
// opening (erosion then dilation) removes runs of Ones shorter than the
// structuring element; the following closing (dilation then erosion) fills
// runs of Zeros shorter than it. Each of the four operations is one
// morph_stage shift register of MASKSIZE flip-flops, 4*MASKSIZE flip-flops in
// all. The cascade order and the shift-register stages follow the design. The
// default MASKSIZE = 3 is the compromise the design names for the
// correlation decoders; MASKSIZE = 5 is its compromise for a simple chip
// detector.
//
// Interface: clk (90 kHz), rst_n (asynchronous, active low), din, dout.
// Timing: a clean edge reaches dout after about 2*MASKSIZE clocks; pulses or
// gaps of fewer than MASKSIZE samples are removed.
module mo_filter #(
  parameter int unsigned MASKSIZE = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);

  logic ero1, dil2, dil3;

  // opening
  morph_stage #(.MASKSIZE(MASKSIZE), .DILATE(1'b0)) u_erode1 (.clk, .rst_n, .din(din),  .dout(ero1));
  morph_stage #(.MASKSIZE(MASKSIZE), .DILATE(1'b1)) u_dilate2(.clk, .rst_n, .din(ero1), .dout(dil2));
  // closing
  morph_stage #(.MASKSIZE(MASKSIZE), .DILATE(1'b1)) u_dilate3(.clk, .rst_n, .din(dil2), .dout(dil3));
  morph_stage #(.MASKSIZE(MASKSIZE), .DILATE(1'b0)) u_erode4 (.clk, .rst_n, .din(dil3), .dout(dout));

endmodule
