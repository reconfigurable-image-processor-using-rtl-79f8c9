// Image mirroring by exchanging the horizontal and vertical ROM addresses.
//
// The display scans screen position (row, col) of the image; this block
// returns the ROM position to show there. When enabled, following the
// document, the row address is used as the column address of the ROM and the
// column address as the row address, so the image appears reflected about its
// main diagonal. When not enabled the address passes unchanged, so the block
// can sit in the address path permanently and be switched by the mode
// decoder. Combinational.
module mirror #(
  parameter int unsigned DIM   = 16,
  parameter int unsigned DIM_W = $clog2(DIM)
) (
  input  logic             enable,
  input  logic [DIM_W-1:0] row_in,
  input  logic [DIM_W-1:0] col_in,
  output logic [DIM_W-1:0] row_out,
  output logic [DIM_W-1:0] col_out
);

  always_comb begin
    if (enable) begin
      row_out = col_in;
      col_out = row_in;
    end else begin
      row_out = row_in;
      col_out = col_in;
    end
  end

endmodule
