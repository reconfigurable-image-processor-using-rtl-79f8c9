// Testbench for image_rom: hand-picked pixels of the sprite, the colour
// census of the whole image, and port B read independently of port A.
module tb_image_rom;
  logic [7:0] addr_a, addr_b, data_a, data_b;
  int checks = 0, failures = 0;
  logic [7:0] img [256];

  image_rom dut (.addr_a(addr_a), .data_a(data_a), .addr_b(addr_b), .data_b(data_b));

  task automatic check_px(input int r, input int c, input int exp);
    addr_a = 8'(r * 16 + c);
    #1;
    checks++;
    if (int'(data_a) != exp) begin
      failures++;
      $display("FAIL pixel (%0d,%0d) = %02h, expected %02h", r, c, data_a, exp);
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
    int n_blue, n_white;
    check_px(0, 0, 8'hFF);    // background
    check_px(0, 4, 8'hE0);    // cap
    check_px(0, 8, 8'hE0);
    check_px(0, 9, 8'hFF);
    check_px(2, 3, 8'h44);    // hair
    check_px(3, 3, 8'hF5);    // face
    check_px(9, 5, 8'h03);    // overalls
    check_px(10, 5, 8'hFC);   // button
    check_px(10, 8, 8'hFC);
    check_px(15, 1, 8'h44);   // shoe
    check_px(15, 15, 8'hFF);
    n_blue = 0; n_white = 0;
    addr_b = 0;
    for (int a = 0; a < 256; a++) begin
      addr_a = 8'(a);
      #1;
      img[a] = data_a;
      if (data_a == 8'h03) n_blue++;
      if (data_a == 8'hFF) n_white++;
    end
    // port B, walked in the opposite order while port A points elsewhere
    for (int a = 0; a < 256; a++) begin
      addr_a = 8'(a);
      addr_b = 8'(255 - a);
      #1;
      checks++;
      if (data_b != img[255 - a]) begin failures++; $display("FAIL port B at %0d", 255 - a); end
    end
    // sprite census worked out from its text rows: 31 blue, 112 background
    checks++;
    if (n_blue != 31 || n_white != 112) begin
      failures++;
      $display("FAIL census blue=%0d white=%0d", n_blue, n_white);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
