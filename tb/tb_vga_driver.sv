// Testbench for vga_driver at its default 640x480 timing. The testbench keeps
// its own model of the scan position, advanced every second clock from reset,
// and compares all ten output lines with it on every pixel for a little over
// one frame: hsync and vsync low in their sync intervals, black in blanking,
// green outside the image window and, inside it, the pixel returned for the
// requested (row, col), which the testbench makes {row, col}. It also checks
// that the requested coordinates are the zoomed window position and that
// frame_tick comes once per 800 x 525 pixel periods.
module tb_vga_driver;
  localparam int H_TOTAL = 800, V_TOTAL = 525;
  localparam int X0 = 192, Y0 = 112, ZOOM = 16;

  logic       clk = 0, rst = 1;
  logic [3:0] img_row, img_col;
  logic       in_image, pix_en, frame_tick;
  logic [7:0] pixel_in;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic       hsync, vsync;
  int checks = 0, failures = 0, frames = 0, errs_shown = 0;
  int th = 0, tv = 0, tdiv = 0, out_h = -1, out_v = -1, cyc = 0, last_tick = -1;
  bit fresh = 0;

  vga_driver dut (.clk(clk), .rst(rst), .img_row(img_row), .img_col(img_col), .in_image(in_image),
                  .pixel_in(pixel_in), .pix_en(pix_en), .frame_tick(frame_tick),
                  .vga_red(vga_red), .vga_green(vga_green), .vga_blue(vga_blue),
                  .hsync(hsync), .vsync(vsync));

  assign pixel_in = {img_row, img_col};

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (errs_shown < 20) begin errs_shown++; $display("FAIL %s (h=%0d v=%0d)", what, out_h, out_v); end
    end
  endtask

  // model of the scan position; the outputs show position (out_h, out_v)
  always @(posedge clk) begin
    fresh <= 0;
    if (!rst) begin
      cyc++;
      if (frame_tick) begin
        if (last_tick >= 0) check(cyc - last_tick == 2 * H_TOTAL * V_TOTAL, "frame_tick period");
        last_tick = cyc;
        frames++;
      end
      if (tdiv == 1) begin
        out_h <= th; out_v <= tv; fresh <= 1;
        if (th == H_TOTAL - 1) begin th <= 0; tv <= (tv == V_TOTAL - 1) ? 0 : tv + 1; end
        else th <= th + 1;
      end
      tdiv <= 1 - tdiv;
    end
  end

  always @(negedge clk) begin
    if (fresh) begin
      int exp;
      bit vis, win;
      vis = out_h < 640 && out_v < 480;
      win = vis && out_h >= X0 && out_h < X0 + 16 * ZOOM && out_v >= Y0 && out_v < Y0 + 16 * ZOOM;
      if (win)      exp = ((out_v - Y0) / ZOOM) * 16 + (out_h - X0) / ZOOM;
      else if (vis) exp = 8'h1C;
      else          exp = 0;
      check(int'({vga_red, vga_green, vga_blue}) == exp, "colour");
      check(hsync == !(out_h >= 656 && out_h < 752), "hsync");
      check(vsync == !(out_v >= 490 && out_v < 492), "vsync");
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (frames == 2);
    repeat (3000) @(posedge clk);
    check(frames == 2, "two frame ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
