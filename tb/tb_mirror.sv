// Testbench for mirror: every position with the block disabled (unchanged)
// and enabled (row and column exchanged).
module tb_mirror;
  logic       enable;
  logic [3:0] row_in, col_in, row_out, col_out;
  int checks = 0, failures = 0;

  mirror #(.DIM(16)) dut (.enable(enable), .row_in(row_in), .col_in(col_in),
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
        enable = 0; #1 check(r, c, "off");
        enable = 1; #1 check(c, r, "mirror");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
