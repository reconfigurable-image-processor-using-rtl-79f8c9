// Shared types, constants and pixel arithmetic of the command-controlled
// image processor.
//
// Pixels are 8-bit RGB332 words {red[2:0], green[2:0], blue[1:0]}: the eight
// colour lines of a 3-3-2 resistor VGA port, which together with the two sync
// lines make the ten signals that leave the FPGA. The source image is a 16x16
// sprite (256 pixels). The operating modes are selected by a 4-bit binary
// command; the code values below are this design's own numbering.
//
// luma() forms an 8-bit intensity from an RGB332 pixel with the ITU-R BT.601
// weights (77, 150, 29)/256 after widening each channel to 8 bits by bit
// replication. grey_pixel() builds an RGB332 grey from a 3-bit level.
// build_image() returns the built-in sprite, described row by row as text
// with one character per pixel.
package imgproc_pkg;

  localparam int unsigned IMG_DIM   = 16;          // image is IMG_DIM x IMG_DIM
  localparam int unsigned IMG_PIXELS = IMG_DIM * IMG_DIM;
  localparam int unsigned PIX_W     = 8;

  typedef logic [PIX_W-1:0] pixel_t;

  // Operating modes, one per processing block plus the unprocessed image.
  typedef enum logic [3:0] {
    MODE_ORIGINAL = 4'd0,
    MODE_BW       = 4'd1,
    MODE_GREY     = 4'd2,
    MODE_FILTER   = 4'd3,
    MODE_ROT90    = 4'd4,
    MODE_ROT180   = 4'd5,
    MODE_MIRROR   = 4'd6,
    MODE_ANIM     = 4'd7
  } mode_e;

  // Named RGB332 colours.
  localparam pixel_t C_BLACK  = 8'h00;
  localparam pixel_t C_WHITE  = 8'hFF;
  localparam pixel_t C_RED    = 8'hE0;
  localparam pixel_t C_GREEN  = 8'h1C;
  localparam pixel_t C_BLUE   = 8'h03;
  localparam pixel_t C_YELLOW = 8'hFC;
  localparam pixel_t C_SKIN   = 8'hF5;
  localparam pixel_t C_BROWN  = 8'h44;

  typedef logic [IMG_PIXELS-1:0][PIX_W-1:0] image_t;

  // Intensity 0..255 of an RGB332 pixel.
  function automatic logic [7:0] luma(input pixel_t p);
    logic [7:0]  r8, g8, b8;
    r8  = {p[7:5], p[7:5], p[7:6]};
    g8  = {p[4:2], p[4:2], p[4:3]};
    b8  = {p[1:0], p[1:0], p[1:0], p[1:0]};
    return 8'((16'(r8) * 16'd77 + 16'(g8) * 16'd150 + 16'(b8) * 16'd29) >> 8);
  endfunction

  // RGB332 grey of level 0 (black) .. 7 (white).
  function automatic pixel_t grey_pixel(input logic [2:0] level);
    return {level, level, level[2:1]};
  endfunction

  // Colour of one sprite character.
  function automatic pixel_t char_colour(input logic [7:0] ch);
    case (ch)
      "R":     return C_RED;
      "B":     return C_BLUE;
      "K":     return C_BROWN;
      "S":     return C_SKIN;
      "Y":     return C_YELLOW;
      default: return C_WHITE;
    endcase
  endfunction

  // One text row of the sprite; the leftmost character is column 0.
  function automatic logic [IMG_DIM*8-1:0] sprite_row(input int unsigned r);
    case (r)
      0:  return "....RRRRR.......";
      1:  return "...RRRRRRRRR....";
      2:  return "...KKKSSKS......";
      3:  return "..KSKSSSKSSS....";
      4:  return "..KSKKSSSKSSS...";
      5:  return "..KKSSSSKKKK....";
      6:  return "....SSSSSSS.....";
      7:  return "...RRBRRRR......";
      8:  return "..RRRBRRBRRR....";
      9:  return ".RRRRBBBBRRRR...";
      10: return ".SSRBYBBYBRSS...";
      11: return ".SSSBBBBBBSSS...";
      12: return ".SSBBBBBBBBSS...";
      13: return "...BBB..BBB.....";
      14: return "..KKK....KKK....";
      default: return ".KKKK....KKKK...";
    endcase
  endfunction

  // The whole sprite, pixel index = row * IMG_DIM + column.
  function automatic image_t build_image();
    image_t img;
    logic [IMG_DIM*8-1:0] line;
    for (int unsigned r = 0; r < IMG_DIM; r++) begin
      line = sprite_row(r);
      for (int unsigned c = 0; c < IMG_DIM; c++)
        img[r*IMG_DIM + c] = char_colour(line[(IMG_DIM-1-c)*8 +: 8]);
    end
    return img;
  endfunction

endpackage
