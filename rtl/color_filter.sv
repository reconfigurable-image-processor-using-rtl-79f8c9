// Colour filter: one colour is kept, the rest of the image turns grey.
//
// A pixel whose RGB332 value equals KEEP_COLOR passes unchanged; every other
// pixel goes through the same threshold-ladder greyscale conversion as the
// greyscale mode (an instance of the greyscale block). The document keeps the
// blue of the image; blue (8'h03) is therefore the default, and an exact match
// of the 8-bit value is this design's reading of "one particular value".
// Purely combinational.
module color_filter
  import imgproc_pkg::*;
#(
  parameter pixel_t KEEP_COLOR = C_BLUE
) (
  input  pixel_t pixel_in,
  output pixel_t pixel_out
);

  pixel_t grey;

  greyscale u_grey (
    .pixel_in (pixel_in),
    .pixel_out(grey)
  );

  always_comb pixel_out = (pixel_in == KEEP_COLOR) ? pixel_in : grey;

endmodule
