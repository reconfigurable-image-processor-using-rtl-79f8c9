// Testbench for color_filter: the kept colour (blue) must pass unchanged,
// every other pixel value must come out as its reference grey.
module tb_color_filter;
  import tb_ref_pkg::*;

  logic [7:0] pixel_in, pixel_out;
  int checks = 0, failures = 0, kept = 0;

  color_filter dut (.pixel_in(pixel_in), .pixel_out(pixel_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      int exp;
      pixel_in = 8'(p);
      exp = (p == 8'h03) ? p : ref_grey(p);
      #1;
      checks++;
      if (int'(pixel_out) != exp) begin
        failures++;
        $display("FAIL pixel %02h -> %02h, expected %02h", pixel_in, pixel_out, exp);
      end
      if (p == 8'h03 && pixel_out == 8'h03) kept++;
    end
    // blue itself would be black in greyscale, so passing it is visible
    checks++;
    if (kept != 1) begin failures++; $display("FAIL blue was not kept"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
