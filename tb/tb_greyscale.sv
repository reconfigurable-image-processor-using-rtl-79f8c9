// Testbench for greyscale: all 256 pixel values against the reference band
// ladder, plus the hand-worked shades of the sprite's colours.
module tb_greyscale;
  import tb_ref_pkg::*;

  logic [7:0] pixel_in, pixel_out;
  int checks = 0, failures = 0;

  greyscale dut (.pixel_in(pixel_in), .pixel_out(pixel_out));

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(pixel_out) != exp) begin
      failures++;
      $display("FAIL %s: pixel %02h -> %02h, expected %02h", what, pixel_in, pixel_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // hand-worked: intensity white 255 -> band 4 -> FF; red 76 -> band 1 -> level 1 -> 24;
    // skin F5 is 192 -> band 3 -> level 5 -> B6; blue 28 and brown 43 -> black;
    // yellow FC is 226 -> white
    pixel_in = 8'hFF; #1 check(8'hFF, "white");
    pixel_in = 8'hE0; #1 check(8'h24, "red");
    pixel_in = 8'hF5; #1 check(8'hB6, "skin");
    pixel_in = 8'h03; #1 check(8'h00, "blue");
    pixel_in = 8'h44; #1 check(8'h00, "brown");
    pixel_in = 8'hFC; #1 check(8'hFF, "yellow");
    for (int p = 0; p < 256; p++) begin
      pixel_in = 8'(p);
      #1 check(ref_grey(p), "sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
