// VGA driver for a 640x480 display with a zoomed 16x16 image in the middle.
//
// From the system clock (50 MHz) a pixel enable is made every CLK_DIV cycles
// (25 MHz pixel rate). On each enable a horizontal counter (0 .. H_TOTAL-1)
// and a vertical counter (0 .. V_TOTAL-1) advance through the industry
// 640x480 at 60 Hz timing: 640 visible pixels, 16 front porch, 96 sync,
// 48 back porch per line; 480 visible lines, 10 front porch, 2 sync, 33 back
// porch per frame; both syncs active low.
// The image is enlarged by 2**ZOOM_SHIFT in both directions and placed with
// its top-left corner at (X0, Y0). For the pixel under the counters the
// driver presents img_row / img_col (the image pixel to show) and in_image;
// the pixel processing path returns the colour on pixel_in in the same cycle.
// On the pixel enable the driver registers colour, hsync and vsync together,
// so all ten output lines change on the same clock edge, one pixel period
// after the counters. Visible pixels outside the image show BG_COLOR; the
// blanking intervals output black. frame_tick pulses for one clock at the
// last pixel of each frame.
// 640x480 resolution, sync generation, the zoom of a 256-pixel image and the
// ten output lines (8 colour + 2 sync) follow the document; the clock divider,
// the porch values (standard VESA), the zoom factor, the image position and
// the green background are this design's choices.
module vga_driver
  import imgproc_pkg::*;
#(
  parameter int unsigned CLK_DIV    = 2,
  parameter int unsigned H_ACTIVE   = 640,
  parameter int unsigned H_FP       = 16,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BP       = 48,
  parameter int unsigned V_ACTIVE   = 480,
  parameter int unsigned V_FP       = 10,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 33,
  parameter int unsigned DIM        = IMG_DIM,
  parameter int unsigned ZOOM_SHIFT = 4,
  parameter int unsigned X0         = (H_ACTIVE - (DIM << ZOOM_SHIFT)) / 2,
  parameter int unsigned Y0         = (V_ACTIVE - (DIM << ZOOM_SHIFT)) / 2,
  parameter pixel_t      BG_COLOR   = C_GREEN,
  parameter int unsigned DIM_W      = $clog2(DIM)
) (
  input  logic             clk,
  input  logic             rst,
  // pixel request / return
  output logic [DIM_W-1:0] img_row,
  output logic [DIM_W-1:0] img_col,
  output logic             in_image,
  input  pixel_t           pixel_in,
  // display timing
  output logic             pix_en,
  output logic             frame_tick,
  // VGA port
  output logic [2:0]       vga_red,
  output logic [2:0]       vga_green,
  output logic [1:0]       vga_blue,
  output logic             hsync,
  output logic             vsync
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned H_W     = $clog2(H_TOTAL);
  localparam int unsigned V_W     = $clog2(V_TOTAL);
  localparam int unsigned DIV_W   = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned IMG_PX  = DIM << ZOOM_SHIFT;

  logic [DIV_W-1:0] div_cnt;
  logic [H_W-1:0]   hcnt;
  logic [V_W-1:0]   vcnt;
  logic             visible;
  logic [H_W-1:0]   hrel;
  logic [V_W-1:0]   vrel;
  pixel_t           colour;

  // Pixel enable
  always_ff @(posedge clk) begin
    if (rst) div_cnt <= '0;
    else if (32'(div_cnt) == CLK_DIV - 1) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end
  assign pix_en = (32'(div_cnt) == CLK_DIV - 1);

  // Scan counters
  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (pix_en) begin
      if (32'(hcnt) == H_TOTAL - 1) begin
        hcnt <= '0;
        if (32'(vcnt) == V_TOTAL - 1) vcnt <= '0;
        else                          vcnt <= vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

  // Image window and zoom
  always_comb begin
    visible  = (32'(hcnt) < H_ACTIVE) && (32'(vcnt) < V_ACTIVE);
    in_image = visible
            && (32'(hcnt) >= X0) && (32'(hcnt) < X0 + IMG_PX)
            && (32'(vcnt) >= Y0) && (32'(vcnt) < Y0 + IMG_PX);
    hrel     = hcnt - H_W'(X0);
    vrel     = vcnt - V_W'(Y0);
    img_col  = DIM_W'(hrel >> ZOOM_SHIFT);
    img_row  = DIM_W'(vrel >> ZOOM_SHIFT);
    if (in_image)     colour = pixel_in;
    else if (visible) colour = BG_COLOR;
    else              colour = C_BLACK;
    frame_tick = pix_en && (32'(hcnt) == H_TOTAL - 1) && (32'(vcnt) == V_TOTAL - 1);
  end

  // Output register: colour and syncs change together
  always_ff @(posedge clk) begin
    if (rst) begin
      {vga_red, vga_green, vga_blue} <= C_BLACK;
      hsync <= 1'b1;
      vsync <= 1'b1;
    end else if (pix_en) begin
      {vga_red, vga_green, vga_blue} <= colour;
      hsync <= !((32'(hcnt) >= H_ACTIVE + H_FP) && (32'(hcnt) < H_ACTIVE + H_FP + H_SYNC));
      vsync <= !((32'(vcnt) >= V_ACTIVE + V_FP) && (32'(vcnt) < V_ACTIVE + V_FP + V_SYNC));
    end
  end

endmodule
