// End-to-end testbench of imgproc_top at its default parameters.
// The testbench stands in for the host and the monitor: it drives the 4-bit
// command and the black-and-white threshold, and reads the ten VGA lines.
// A model of the 640x480 scan position, advanced every second clock from
// reset, tells which screen pixel the outputs show; every pixel's syncs are
// checked, the background and blanking colours are checked at fixed points,
// and the centre of each of the 16x16 zoomed image cells is captured into a
// frame. The first frame (original image) is checked at hand-picked pixels
// and then serves as the reference: each later frame is compared with the
// original transformed by the testbench's own model of the selected
// operation. Mechanisms exercised and counted: each of the eight modes, an
// unused command code, a threshold change, a mode change taking effect
// between frames, and in animation the shifted frame and the swaps between
// the two frames every two display frames.
module tb_imgproc_top;
  import tb_ref_pkg::*;

  localparam int H_TOTAL = 800, V_TOTAL = 525;
  localparam int X0 = 192, Y0 = 112, ZOOM = 16;

  logic       clk = 0, rst = 1;
  logic [3:0] cmd = 0;
  logic [7:0] thr = 8'd128;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic       hsync, vsync;

  int checks = 0, failures = 0, errs_shown = 0;
  int th = 0, tv = 0, tdiv = 0, out_h = -1, out_v = -1;
  bit fresh = 0;
  int cap  [16][16];
  int orig [16][16];
  int frame_done = 0;
  int seen [string];

  imgproc_top dut (.clk(clk), .rst(rst), .cmd(cmd), .bw_threshold(thr),
                   .vga_red(vga_red), .vga_green(vga_green), .vga_blue(vga_blue),
                   .hsync(hsync), .vsync(vsync));

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (errs_shown < 30) begin errs_shown++; $display("FAIL %s", what); end
    end
  endtask

  always @(posedge clk) begin
    fresh <= 0;
    if (!rst) begin
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
      int pix;
      pix = int'({vga_red, vga_green, vga_blue});
      check(hsync == !(out_h >= 656 && out_h < 752), $sformatf("hsync at h=%0d", out_h));
      check(vsync == !(out_v >= 490 && out_v < 492), $sformatf("vsync at v=%0d", out_v));
      if (out_h == 40 && out_v == 40)   check(pix == 8'h1C, "green background");
      if (out_h == 700 && out_v == 200) check(pix == 0, "black in blanking");
      if (out_h >= X0 && out_h < X0 + 256 && out_v >= Y0 && out_v < Y0 + 256 &&
          (out_h - X0) % ZOOM == ZOOM / 2 && (out_v - Y0) % ZOOM == ZOOM / 2)
        cap[(out_v - Y0) / ZOOM][(out_h - X0) / ZOOM] = pix;
      if (out_h == 0 && out_v == Y0 + 256) frame_done++;
    end
  end

  task automatic next_frame();
    int n;
    n = frame_done;
    wait (frame_done == n + 1);
  endtask

  // compare the captured frame with the expected one for a mode
  function automatic int expected(input int mode, input int r, input int c, input int t);
    case (mode)
      1: return ref_bw(orig[r][c], t);
      2: return ref_grey(orig[r][c]);
      3: return (orig[r][c] == 8'h03) ? orig[r][c] : ref_grey(orig[r][c]);
      4: return orig[15 - c][r];
      5: return orig[15 - r][15 - c];
      6: return orig[c][r];
      default: return orig[r][c];
    endcase
  endfunction

  function automatic int frame_errors(input int mode, input int t);
    int n = 0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        if (cap[r][c] != expected(mode, r, c, t)) n++;
    return n;
  endfunction

  function automatic bit is_shifted_frame();
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        if (cap[r][c] != ((r < 12) ? orig[r + 4][c] : 0)) return 0;
    return 1;
  endfunction

  // set the command at the top of a frame; check the whole next frame
  task automatic run_mode(input int code, input int mode, input string name);
    int e;
    cmd = 4'(code);
    next_frame();       // frame during which the command arrived
    next_frame();       // a full frame in the new mode
    e = frame_errors(mode, int'(thr));
    check(e == 0, $sformatf("%s: %0d pixels differ", name, e));
    if (e == 0) seen[name] = 1;
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int distinct, swaps, shifted_frames, orig_frames, last_kind, kind;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    next_frame();
    orig = cap;
    // hand-picked pixels of the built-in image: background, cap, hair, face,
    // overalls, button, shoe
    check(orig[0][0] == 8'hFF && orig[0][4] == 8'hE0 && orig[2][3] == 8'h44 &&
          orig[3][3] == 8'hF5 && orig[9][5] == 8'h03 && orig[10][5] == 8'hFC &&
          orig[15][1] == 8'h44, "original image pixels");
    seen["original"] = 1;

    run_mode(1, 1, "black_and_white");
    thr = 8'd200;
    run_mode(1, 1, "black_and_white_thr200");
    // the two thresholds must give different pictures (skin 192 flips)
    check(frame_errors(1, 128) > 0, "threshold change visible");
    thr = 8'd128;
    run_mode(2, 2, "greyscale");
    run_mode(3, 3, "color_filter");
    run_mode(4, 4, "rotate90");
    run_mode(5, 5, "rotate180");
    run_mode(6, 6, "mirror");
    run_mode(9, 0, "unused_code");
    run_mode(0, 0, "original_again");

    // animation: watch eight frames, classify each, count swaps
    cmd = 4'd7;
    next_frame();
    swaps = 0; shifted_frames = 0; orig_frames = 0; last_kind = -1;
    for (int f = 0; f < 8; f++) begin
      next_frame();
      if (frame_errors(0, 0) == 0) kind = 0;
      else if (is_shifted_frame()) kind = 1;
      else kind = 2;
      check(kind != 2, $sformatf("animation frame %0d is neither frame", f));
      if (kind == 0) orig_frames++;
      if (kind == 1) shifted_frames++;
      if (last_kind >= 0 && kind != last_kind) swaps++;
      last_kind = kind;
    end
    check(shifted_frames == 4 && orig_frames == 4, "animation: four frames of each");
    check(swaps >= 3, $sformatf("animation: %0d swaps", swaps));
    if (shifted_frames > 0) seen["animation_shifted_frame"] = 1;
    if (swaps > 0) seen["animation_swap"] = 1;

    distinct = 0;
    foreach (seen[k]) begin
      distinct++;
      $display("mechanism %s: seen", k);
    end
    check(distinct == 12, $sformatf("%0d of 12 mechanisms seen", distinct));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
