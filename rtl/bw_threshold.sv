// Colour to black-and-white conversion by thresholding.
//
// The intensity of the incoming RGB332 pixel (imgproc_pkg::luma) is compared
// with a threshold; pixels at or above it become white, all others black.
// Following the document, the threshold is chosen by the user, so it is an
// input here (the top brings it out as a port). Comparing an intensity rather
// than the raw 8-bit colour code is this design's reading of "pixel value".
// Purely combinational; the VGA driver registers the result.
module bw_threshold
  import imgproc_pkg::*;
(
  input  pixel_t     pixel_in,
  input  logic [7:0] threshold,
  output pixel_t     pixel_out
);

  always_comb pixel_out = (luma(pixel_in) >= threshold) ? C_WHITE : C_BLACK;

endmodule
