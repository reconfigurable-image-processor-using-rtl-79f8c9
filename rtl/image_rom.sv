// Source image ROM: the 16x16 colour image that every operation works on.
//
// The contents are the built-in sprite of imgproc_pkg::build_image(), fixed at
// elaboration. The ROM has two independent read ports with combinational
// (asynchronous) read, as distributed ROM in LUTs: port A feeds the display
// path, port B is read by the animation block while it builds its shifted
// frame. Address = row * IMG_DIM + column. A stored image with two read ports
// follows the document's description of a ROM accessed both by the display
// and by the animation copy; asynchronous read is this design's choice so that
// the display pipeline needs no extra stage.
module image_rom
  import imgproc_pkg::*;
#(
  parameter int unsigned DEPTH  = IMG_PIXELS,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic [ADDR_W-1:0] addr_a,
  output pixel_t            data_a,
  input  logic [ADDR_W-1:0] addr_b,
  output pixel_t            data_b
);

  localparam image_t CONTENTS = build_image();

  always_comb begin
    data_a = CONTENTS[addr_a];
    data_b = CONTENTS[addr_b];
  end

endmodule
