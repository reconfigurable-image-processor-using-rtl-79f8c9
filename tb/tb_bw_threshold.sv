// Testbench for bw_threshold: every pixel value against several thresholds,
// plus hand-worked cases, compared with the reference intensity.
module tb_bw_threshold;
  import tb_ref_pkg::*;

  logic [7:0] pixel_in, threshold, pixel_out;
  int checks = 0, failures = 0;

  bw_threshold dut (.pixel_in(pixel_in), .threshold(threshold), .pixel_out(pixel_out));

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(pixel_out) != exp) begin
      failures++;
      $display("FAIL %s: pixel %02h thr %0d -> %02h, expected %02h", what, pixel_in, threshold, pixel_out, exp);
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
    // hand-worked: white (255) and black (0), red E0 has intensity 76
    pixel_in = 8'hFF; threshold = 8'd255; #1 check(255, "white at 255");
    pixel_in = 8'h00; threshold = 8'd1;   #1 check(0,   "black");
    pixel_in = 8'hE0; threshold = 8'd76;  #1 check(255, "red at 76");
    pixel_in = 8'hE0; threshold = 8'd77;  #1 check(0,   "red at 77");
    for (int t = 0; t < 256; t += 17) begin
      for (int p = 0; p < 256; p++) begin
        pixel_in = 8'(p); threshold = 8'(t);
        #1 check(ref_bw(p, t), "sweep");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
