// Command decoder: turns the 4-bit binary command from the host's GPIO pins
// into the operating mode of the image processor.
//
// The GPIO lines are asynchronous to the FPGA clock, so they pass through a
// two-flop synchroniser. The synchronised code is then decoded: codes 0..7
// select a mode of imgproc_pkg::mode_e, codes 8..15 are unused and select the
// unprocessed image. The mode register changes only when the same code has
// been seen on two consecutive cycles, so a code caught while the host is
// changing several pins is never decoded. mode_changed pulses for one cycle
// when a new mode takes effect. Because only codes 0..7 name a mode, bit 3 of
// `mode` is always 0; the enum keeps the full 4-bit command width.
// Timing: a stable new code reaches `mode` four clock cycles after it
// appears on gpio (two synchroniser flops, the one-cycle agreement check and
// the mode register).
// A 4-bit binary command follows the document; the synchroniser, the code
// table and the reset mode (unprocessed image) are this design's choices.
module command_decoder
  import imgproc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] gpio,
  output mode_e      mode,
  output logic       mode_changed
);

  logic [3:0] sync1, sync2, prev;
  mode_e      next_mode;

  always_comb begin
    if (sync2[3]) next_mode = MODE_ORIGINAL;
    else          next_mode = mode_e'(sync2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1        <= '0;
      sync2        <= '0;
      prev         <= '0;
      mode         <= MODE_ORIGINAL;
      mode_changed <= 1'b0;
    end else begin
      sync1        <= gpio;
      sync2        <= sync1;
      prev         <= sync2;
      mode_changed <= 1'b0;
      if (sync2 == prev && next_mode != mode) begin
        mode         <= next_mode;
        mode_changed <= 1'b1;
      end
    end
  end

endmodule
