// Two-frame animation: a shifted copy of the image alternates with the image.
//
// After reset a copy engine fills a second frame memory from the image ROM,
// one pixel per clock: frame-memory entry i receives ROM entry i + SHIFT for
// i < DEPTH - SHIFT, and the remaining SHIFT entries are cleared to black
// (empty). With SHIFT = 64 on a 16x16 image the second frame is the image
// moved up by four rows with black below it. The copy takes exactly DEPTH
// clock cycles; copy_busy is high during them and copy_done afterwards.
// A frame counter then counts display frames (frame_tick, one pulse per VGA
// frame) and toggles frame_sel every FRAMES_PER_SWAP frames; pixel_out is the
// ROM pixel while frame_sel = 0 and the frame-memory pixel at the same
// address while frame_sel = 1. With a 60 Hz display and FRAMES_PER_SWAP = 2
// the picture changes 30 times a second.
// The shifted copy into a second memory, the cleared remainder and the
// counter that alternates the two follow the document; the shift amount
// (read as 192 = 12 rows copied), the swap period and the one-pixel-per-clock
// copy after reset are this design's choices. The frame memory has one write
// port (copy engine) and one asynchronous read port (display).
module animation
  import imgproc_pkg::*;
#(
  parameter int unsigned DEPTH           = IMG_PIXELS,
  parameter int unsigned SHIFT           = 64,
  parameter int unsigned FRAMES_PER_SWAP = 2,
  parameter int unsigned ADDR_W          = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  // copy port into the image ROM
  output logic [ADDR_W-1:0] rom_addr,
  input  pixel_t            rom_data,
  // display side
  input  logic              frame_tick,
  input  logic [ADDR_W-1:0] rd_addr,
  input  pixel_t            rom_pixel,    // ROM pixel at rd_addr
  output pixel_t            pixel_out,
  output logic              frame_sel,
  output logic              copy_busy,
  output logic              copy_done
);

  localparam int unsigned CNT_W = (FRAMES_PER_SWAP > 1) ? $clog2(FRAMES_PER_SWAP) : 1;

  typedef enum logic [1:0] {S_IDLE, S_COPY, S_DONE} state_e;

  state_e            state;
  logic [ADDR_W-1:0] idx;
  logic [CNT_W-1:0]  frame_cnt;
  pixel_t            frame_mem [DEPTH];

  always_comb begin
    rom_addr  = ADDR_W'(32'(idx) + SHIFT);
    copy_busy = (state == S_COPY);
    copy_done = (state == S_DONE);
    pixel_out = frame_sel ? frame_mem[rd_addr] : rom_pixel;
  end

  // Copy engine
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      idx   <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          state <= S_COPY;
          idx   <= '0;
        end
        S_COPY: begin
          if (32'(idx) == DEPTH - 1) state <= S_DONE;
          else                       idx   <= idx + 1'b1;
        end
        default: state <= S_DONE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_COPY)
      frame_mem[idx] <= (32'(idx) < DEPTH - SHIFT) ? rom_data : C_BLACK;
  end

  // Frame alternation counter
  always_ff @(posedge clk) begin
    if (rst) begin
      frame_cnt <= '0;
      frame_sel <= 1'b0;
    end else if (frame_tick && copy_done) begin
      if (32'(frame_cnt) == FRAMES_PER_SWAP - 1) begin
        frame_cnt <= '0;
        frame_sel <= ~frame_sel;
      end else begin
        frame_cnt <= frame_cnt + 1'b1;
      end
    end
  end

  a_idx_in_range: assert property (@(posedge clk) disable iff (rst)
    copy_busy |-> (32'(idx) < DEPTH));
  a_no_swap_before_copy: assert property (@(posedge clk) disable iff (rst)
    !copy_done |-> !frame_sel);

endmodule
