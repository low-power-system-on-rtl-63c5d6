// Edge detector for one 4x4 luma block.
//
// The block arrives as 16 packed 8-bit pixels (pixel (y,x) in bits [8*(4*y+x) +: 8]).
// The first and last rows and columns are skipped; for each of the four interior
// pixels a 3x3 Sobel operator gives a horizontal gradient gx (right column minus left
// column, weights 1-2-1) and a vertical gradient gy (bottom row minus top row). If
// |gx| of any interior pixel is above THRESHOLD, horizontal_edge is set; likewise
// |gy| sets vertical_edge. The Sobel kernel, the interior-only scan, the threshold
// of 128 and the flag names follow the design description; reporting a flag when
// any one interior pixel crosses the threshold is this design's reading of it.
//
// Purely combinational, no clock: the flags are valid in the same cycle as the block.
module edge_detect
  import h265_pkg::*;
#(
  parameter int THRESHOLD = EDGE_THRESHOLD
) (
  input  logic [127:0] block_i,
  output logic         horizontal_edge,
  output logic         vertical_edge
);

  // |gx|,|gy| <= 4*255 = 1020; a 12-bit signed datapath after synthesis.
  function automatic int px(input logic [127:0] b, input int y, input int x);
    return int'(b[8*(4*y+x) +: 8]);
  endfunction

  always_comb begin
    horizontal_edge = 1'b0;
    vertical_edge   = 1'b0;
    for (int y = 1; y < 3; y++) begin
      for (int x = 1; x < 3; x++) begin
        sint_t gx, gy;
        gx = (px(block_i, y-1, x+1) + 2*px(block_i, y, x+1) + px(block_i, y+1, x+1))
           - (px(block_i, y-1, x-1) + 2*px(block_i, y, x-1) + px(block_i, y+1, x-1));
        gy = (px(block_i, y+1, x-1) + 2*px(block_i, y+1, x) + px(block_i, y+1, x+1))
           - (px(block_i, y-1, x-1) + 2*px(block_i, y-1, x) + px(block_i, y-1, x+1));
        if (gx > THRESHOLD || gx < -THRESHOLD) horizontal_edge = 1'b1;
        if (gy > THRESHOLD || gy < -THRESHOLD) vertical_edge   = 1'b1;
      end
    end
  end

endmodule
