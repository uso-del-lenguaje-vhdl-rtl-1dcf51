// Sector decoder for the inverter firing controller.
//
// The angle is an unsigned AW-bit fraction of a full turn (2^AW = 360 deg).
// The turn is split into six 60-degree sectors; sector k (k = 1..6) covers
// [(k-1)*60, k*60) degrees and drives bit k-1 of the one-hot output. The
// sector number is floor(angle * 6 / 2^AW). Combinational.
//
// The sector names A1..A6 follow the document's schematic; the angle
// encoding is this design's choice.
module sector_decoder #(
  parameter int AW = 12
) (
  input  logic [AW-1:0] angle_i,
  output logic [5:0]    sector_o
);

  logic [AW+2:0] scaled;     // angle * 6, needs 3 more bits
  logic [2:0]    idx;

  always_comb begin
    scaled   = {3'b000, angle_i} * (AW+3)'(6);
    idx      = scaled[AW+2:AW];        // 0..5
    sector_o = 6'b000001 << idx;
  end

endmodule
