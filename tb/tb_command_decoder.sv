// Testbench for command_decoder: every 4-bit code, the four-cycle latency of
// a stable code, the fall-back of unused codes to the original image, the
// mode_changed pulse, and rejection of a code that is not stable for two
// cycles after synchronisation.
module tb_command_decoder;
  import imgproc_pkg::*;

  logic  clk = 0, rst = 1;
  logic [3:0] gpio = 0;
  mode_e mode;
  logic  mode_changed;
  int checks = 0, failures = 0, pulses = 0, prev_mode = 0;

  command_decoder dut (.clk(clk), .rst(rst), .gpio(gpio), .mode(mode), .mode_changed(mode_changed));

  always #5 clk = ~clk;
  always @(posedge clk) if (mode_changed) pulses++;

  task automatic expect_mode(input int exp, input string what);
    checks++;
    if (int'(mode) != exp) begin
      failures++;
      $display("FAIL %s: mode %0d, expected %0d", what, mode, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, p0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    expect_mode(0, "after reset");
    for (int code = 15; code >= 0; code--) begin
      int exp;
      exp = (code >= 8) ? 0 : code;
      p0  = pulses;
      gpio <= 4'(code);
      lat = 0;
      // count edges until the mode follows
      do begin
        @(posedge clk); #1 lat++;
      end while (int'(mode) != exp && lat < 20);
      expect_mode(exp, "decode");
      repeat (4) @(posedge clk);
      #1;
      // a change of mode gives exactly one pulse, no change gives none
      checks++;
      if ((pulses - p0) != ((exp != prev_mode) ? 1 : 0)) begin
        failures++;
        $display("FAIL code %0d: %0d pulses", code, pulses - p0);
      end
      if (exp != prev_mode) begin
        checks++;
        if (lat != 4) begin failures++; $display("FAIL code %0d: latency %0d", code, lat); end
      end
      prev_mode = exp;
    end
    // glitch: a code held for one cycle only must not be decoded
    gpio <= 4'd5;
    repeat (8) @(posedge clk);
    #1 expect_mode(5, "steady 5");
    gpio <= 4'd2;
    @(posedge clk);
    gpio <= 4'd5;
    repeat (8) @(posedge clk);
    #1 expect_mode(5, "one-cycle glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
