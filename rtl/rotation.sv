// Image rotation by reordering the ROM addresses.
//
// The display scans screen position (row, col) of the image; this block
// returns the source position in the ROM that must be shown there. Nothing is
// moved in memory: as the document describes, only the order in which the ROM
// is read changes.
//   enable = 0:               source = (row, col)            (no rotation)
//   enable = 1, rot180 = 0:   source = (DIM-1-col, row)      (90 deg clockwise)
//   enable = 1, rot180 = 1:   source = (DIM-1-row, DIM-1-col) (180 deg)
// The document explains rotation as keeping the horizontal order and changing
// the vertical one; a vertical reversal alone is a flip, so both orders are
// reversed here for 180 degrees and the two are exchanged for 90 degrees. The
// direction of the 90 degree turn is this design's choice. Combinational.
module rotation #(
  parameter int unsigned DIM   = 16,
  parameter int unsigned DIM_W = $clog2(DIM)
) (
  input  logic             enable,
  input  logic             rot180,
  input  logic [DIM_W-1:0] row_in,
  input  logic [DIM_W-1:0] col_in,
  output logic [DIM_W-1:0] row_out,
  output logic [DIM_W-1:0] col_out
);

  localparam logic [DIM_W-1:0] LAST = DIM_W'(DIM - 1);

  always_comb begin
    if (!enable) begin
      row_out = row_in;
      col_out = col_in;
    end else if (rot180) begin
      row_out = LAST - row_in;
      col_out = LAST - col_in;
    end else begin
      row_out = LAST - col_in;
      col_out = row_in;
    end
  end

endmodule
