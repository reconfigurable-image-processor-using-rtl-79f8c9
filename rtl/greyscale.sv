// Colour to greyscale conversion by a ladder of thresholds.
//
// The intensity of the pixel (imgproc_pkg::luma) is compared with NUM_THR
// ascending thresholds at once. The number of thresholds it reaches is its
// grey band: band 0 (below the lowest threshold) is black, each higher band a
// lighter shade, and the top band white. A band is mapped to a 3-bit grey level
// (band * 7 / NUM_THR) and output as an RGB332 grey. Thresholding into bands
// follows the document; the number of bands, the threshold values and the
// shades are this design's choice. Purely combinational.
module greyscale
  import imgproc_pkg::*;
#(
  parameter int unsigned NUM_THR = 4,
  // THRESHOLDS[0] is the lowest; they must be in ascending order.
  parameter logic [NUM_THR-1:0][7:0] THRESHOLDS = {8'd208, 8'd160, 8'd112, 8'd64}
) (
  input  pixel_t pixel_in,
  output pixel_t pixel_out
);

  localparam int unsigned BAND_W = $clog2(NUM_THR + 1);

  logic [7:0]        y;
  logic [BAND_W-1:0] band;

  always_comb begin
    y    = luma(pixel_in);
    band = '0;
    for (int unsigned i = 0; i < NUM_THR; i++)
      if (y >= THRESHOLDS[i]) band = BAND_W'(i + 1);
    pixel_out = grey_pixel(3'((32'(band) * 7) / NUM_THR));
  end

endmodule
