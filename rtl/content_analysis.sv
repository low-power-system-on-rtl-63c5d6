// Content analyser for one 4x4 luma block: smooth or detailed?
//
// For every pixel that is not in the last row or last column (the 3x3 top-left
// pixels), the squared difference to its right neighbour and to its bottom neighbour
// are added into an energy accumulator ("variance"). Below SMOOTH_TH the block is
// smooth, above DETAILED_TH it is detailed, in between neither flag is set. The
// pixel set, the squared right/bottom differences and the thresholds 1000 and 5000
// follow the design description; the accumulator width (21 bits, enough for
// 18 * 255^2) is this design's choice, and it is brought out for observation.
//
// Purely combinational, no clock. Pixel (y,x) is in bits [8*(4*y+x) +: 8].
module content_analysis
  import h265_pkg::*;
#(
  parameter int SMOOTH_TH   = SMOOTH_THRESHOLD,
  parameter int DETAILED_TH = DETAILED_THRESHOLD
) (
  input  logic [127:0] block_i,
  output logic [20:0]  variance_o,
  output logic         smooth,
  output logic         detailed
);

  always_comb begin
    logic [20:0] acc;
    acc = '0;
    for (int y = 0; y < 3; y++) begin
      for (int x = 0; x < 3; x++) begin
        logic signed [8:0] dr, db;
        dr = $signed({1'b0, block_i[8*(4*y+x) +: 8]}) - $signed({1'b0, block_i[8*(4*y+x+1) +: 8]});
        db = $signed({1'b0, block_i[8*(4*y+x) +: 8]}) - $signed({1'b0, block_i[8*(4*(y+1)+x) +: 8]});
        acc = acc + 21'(unsigned'(18'(dr * dr))) + 21'(unsigned'(18'(db * db)));
      end
    end
    variance_o = acc;
    smooth     = (acc < 21'(SMOOTH_TH));
    detailed   = (acc > 21'(DETAILED_TH));
  end

endmodule
