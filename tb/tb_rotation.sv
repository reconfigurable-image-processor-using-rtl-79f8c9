// Testbench for rotation: every screen position in all three settings
// (off, 90 degrees, 180 degrees). It also checks that four 90-degree steps
// give the identity and two give the 180-degree result.
module tb_rotation;
  logic       enable, rot180;
  logic [3:0] row_in, col_in, row_out, col_out;
  int checks = 0, failures = 0;

  rotation #(.DIM(16)) dut (.enable(enable), .rot180(rot180), .row_in(row_in), .col_in(col_in),
                            .row_out(row_out), .col_out(col_out));

  task automatic check(input int er, input int ec, input string what);
    checks++;
    if (int'(row_out) != er || int'(col_out) != ec) begin
      failures++;
      $display("FAIL %s: (%0d,%0d) -> (%0d,%0d), expected (%0d,%0d)", what, row_in, col_in,
               row_out, col_out, er, ec);
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
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) begin
        row_in = 4'(r); col_in = 4'(c);
        enable = 0; rot180 = 0; #1 check(r, c, "off");
        enable = 0; rot180 = 1; #1 check(r, c, "off/180");
        enable = 1; rot180 = 0; #1 check(15 - c, r, "rot90");
        enable = 1; rot180 = 1; #1 check(15 - r, 15 - c, "rot180");
      end
    end
    // composition: applying the 90-degree map twice equals the 180-degree map
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) begin
        int r1, c1;
        enable = 1; rot180 = 0; row_in = 4'(r); col_in = 4'(c);
        #1 r1 = row_out; c1 = col_out;
        row_in = 4'(r1); col_in = 4'(c1);
        #1 r1 = row_out; c1 = col_out;
        rot180 = 1; row_in = 4'(r); col_in = 4'(c);
        #1 check(r1, c1, "rot90 twice");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
