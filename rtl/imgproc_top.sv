// Command-controlled image processor: the FPGA design.
//
// A 4-bit command from the host's GPIO pins selects one of six operations on
// a 16x16 colour image held in ROM, and the result is shown, enlarged, on a
// 640x480 VGA display. The design works on the pixel stream of the display:
// for each screen position inside the image window the VGA driver asks for
// one image pixel, and the selected operation decides which ROM address is
// read and how the pixel read is recoloured. Nothing is processed ahead of
// time except the second animation frame, which is built once after reset.
//
//   address path:  vga_driver (row,col) -> rotation -> mirror -> image_rom A
//   pixel path:    image_rom A -> animation (frame select)
//                              -> bw_threshold | greyscale | color_filter
//                              -> mode multiplexer -> vga_driver
//
// The mode multiplexer is the "switch case" of the document: the decoded
// command enables the address blocks and picks one pixel block's output.
// Modes (imgproc_pkg::mode_e): 0 original, 1 black and white, 2 greyscale,
// 3 colour filter, 4 rotate 90, 5 rotate 180, 6 mirror, 7 animation;
// codes 8..15 show the original.
// Ports: clk is the 50 MHz board clock, rst is synchronous and active high.
// bw_threshold sets the black-and-white threshold (the document leaves it to
// the user). The ten VGA lines are 3+3+2 colour bits and the two active-low
// syncs. Latency from a pixel's counter position to the VGA pins is one pixel
// period; a new command takes effect four clock cycles after it is stable.
// The block partition follows the document's FPGA block diagram; the exact
// wiring and the mode codes are this design's choices.
module imgproc_top
  import imgproc_pkg::*;
#(
  parameter int unsigned DIM        = IMG_DIM,
  parameter int unsigned CLK_DIV    = 2,
  parameter int unsigned ANIM_SHIFT = 64,
  parameter int unsigned FRAMES_PER_SWAP = 2,
  parameter pixel_t      KEEP_COLOR = C_BLUE
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] cmd,
  input  logic [7:0] bw_threshold,
  output logic [2:0] vga_red,
  output logic [2:0] vga_green,
  output logic [1:0] vga_blue,
  output logic       hsync,
  output logic       vsync
);

  localparam int unsigned DIM_W  = $clog2(DIM);
  localparam int unsigned DEPTH  = DIM * DIM;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  mode_e             mode;
  logic [DIM_W-1:0]  scan_row, scan_col, rot_row, rot_col, src_row, src_col;
  logic              frame_tick;
  logic [ADDR_W-1:0] rom_addr_a, rom_addr_b;
  pixel_t            rom_a, rom_b, anim_pix, bw_pix, grey_pix, filt_pix, out_pix;

  command_decoder u_decoder (
    .clk         (clk),
    .rst         (rst),
    .gpio        (cmd),
    .mode        (mode),
    .mode_changed()
  );

  vga_driver #(
    .CLK_DIV(CLK_DIV),
    .DIM    (DIM)
  ) u_vga (
    .clk       (clk),
    .rst       (rst),
    .img_row   (scan_row),
    .img_col   (scan_col),
    .in_image  (),
    .pixel_in  (out_pix),
    .pix_en    (),
    .frame_tick(frame_tick),
    .vga_red   (vga_red),
    .vga_green (vga_green),
    .vga_blue  (vga_blue),
    .hsync     (hsync),
    .vsync     (vsync)
  );

  rotation #(.DIM(DIM)) u_rotation (
    .enable (mode == MODE_ROT90 || mode == MODE_ROT180),
    .rot180 (mode == MODE_ROT180),
    .row_in (scan_row),
    .col_in (scan_col),
    .row_out(rot_row),
    .col_out(rot_col)
  );

  mirror #(.DIM(DIM)) u_mirror (
    .enable (mode == MODE_MIRROR),
    .row_in (rot_row),
    .col_in (rot_col),
    .row_out(src_row),
    .col_out(src_col)
  );

  assign rom_addr_a = {src_row, src_col};

  image_rom #(.DEPTH(DEPTH)) u_rom (
    .addr_a(rom_addr_a),
    .data_a(rom_a),
    .addr_b(rom_addr_b),
    .data_b(rom_b)
  );

  animation #(
    .DEPTH          (DEPTH),
    .SHIFT          (ANIM_SHIFT),
    .FRAMES_PER_SWAP(FRAMES_PER_SWAP)
  ) u_anim (
    .clk       (clk),
    .rst       (rst),
    .rom_addr  (rom_addr_b),
    .rom_data  (rom_b),
    .frame_tick(frame_tick),
    .rd_addr   (rom_addr_a),
    .rom_pixel (rom_a),
    .pixel_out (anim_pix),
    .frame_sel (),
    .copy_busy (),
    .copy_done ()
  );

  bw_threshold u_bw (
    .pixel_in (rom_a),
    .threshold(bw_threshold),
    .pixel_out(bw_pix)
  );

  greyscale u_grey (
    .pixel_in (rom_a),
    .pixel_out(grey_pix)
  );

  color_filter #(.KEEP_COLOR(KEEP_COLOR)) u_filter (
    .pixel_in (rom_a),
    .pixel_out(filt_pix)
  );

  // Mode multiplexer
  always_comb begin
    case (mode)
      MODE_BW:     out_pix = bw_pix;
      MODE_GREY:   out_pix = grey_pix;
      MODE_FILTER: out_pix = filt_pix;
      MODE_ANIM:   out_pix = anim_pix;
      default:     out_pix = rom_a;   // original, rotations, mirror
    endcase
  end

endmodule
