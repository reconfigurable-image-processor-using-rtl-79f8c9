// Testbench for animation with a behavioural image ROM of random contents.
// Checks: the copy runs for exactly DEPTH cycles after reset, the second
// frame is the ROM shifted by SHIFT entries with the rest black, frame_sel
// does not toggle before the copy is done and then toggles every
// FRAMES_PER_SWAP frame ticks, and pixel_out selects the right frame.
module tb_animation;
  localparam int DEPTH = 256, SHIFT = 64, FPS = 2;

  logic       clk = 0, rst = 1;
  logic [7:0] rom_addr, rom_data, rd_addr, rom_pixel, pixel_out;
  logic       frame_tick = 0, frame_sel, copy_busy, copy_done;
  logic [7:0] rom [DEPTH];
  int checks = 0, failures = 0, busy_cycles = 0, toggles = 0;

  animation #(.DEPTH(DEPTH), .SHIFT(SHIFT), .FRAMES_PER_SWAP(FPS)) dut (
    .clk(clk), .rst(rst), .rom_addr(rom_addr), .rom_data(rom_data), .frame_tick(frame_tick),
    .rd_addr(rd_addr), .rom_pixel(rom_pixel), .pixel_out(pixel_out), .frame_sel(frame_sel),
    .copy_busy(copy_busy), .copy_done(copy_done));

  // behavioural ROM: two asynchronous read ports
  assign rom_data  = rom[rom_addr];
  assign rom_pixel = rom[rd_addr];

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && copy_busy) busy_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_frame(input bit shifted);
    for (int a = 0; a < DEPTH; a++) begin
      int exp;
      rd_addr = 8'(a);
      #1;
      if (!shifted)                exp = rom[a];
      else if (a < DEPTH - SHIFT)  exp = rom[a + SHIFT];
      else                         exp = 0;
      checks++;
      if (int'(pixel_out) != exp) begin
        failures++;
        $display("FAIL frame %0d addr %0d: %02h expected %02h", shifted, a, pixel_out, exp);
      end
    end
  endtask

  task automatic tick();
    @(negedge clk) frame_tick = 1;
    @(negedge clk) frame_tick = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last;
    for (int a = 0; a < DEPTH; a++) rom[a] = 8'($urandom_range(1, 255));
    rd_addr = 0;
    repeat (3) @(posedge clk);
    // ticks during reset and copy must not swap frames
    @(negedge clk) rst = 0;
    tick();
    check(frame_sel == 0, "no swap while copying");
    wait (copy_done);
    @(negedge clk);
    check(busy_cycles == DEPTH, $sformatf("copy took %0d cycles, expected %0d", busy_cycles, DEPTH));
    check(frame_sel == 0, "frame 0 after copy");
    check_frame(0);
    // swap pattern: frame_sel changes on every FPS-th tick
    last = frame_sel;
    for (int t = 1; t <= 4 * FPS; t++) begin
      tick();
      #1;
      if (t % FPS == 0) begin
        check(frame_sel != last, $sformatf("swap at tick %0d", t));
        toggles++;
      end else begin
        check(frame_sel == last, $sformatf("hold at tick %0d", t));
      end
      last = frame_sel;
      if (t == FPS) check_frame(1);
      if (t == 2 * FPS) check_frame(0);
    end
    check(toggles == 4, "four swaps seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
