// 4x4 luma intra predictor for one mode: planar (0), DC (1) or angular (2..34).
//
// Reference layout of ref_i (16 pixels, 128 bits):
//   bytes 0..7  : top[0..7]  - the row above the block and the four pixels above-right
//   bytes 8..15 : left[0..7] - the column left of the block and the four below-left
// The above-left corner pixel is not carried; it is taken as the rounded mean of
// top[0] and left[0].
//
// The prediction follows the HEVC rules for a 4x4 luma block without reference
// smoothing and without the DC / pure horizontal / pure vertical boundary filters:
//   planar : ((3-x)*left[y] + (x+1)*top[4] + (3-y)*top[x] + (y+1)*left[4] + 4) >> 3
//   DC     : (sum of top[0..3] and left[0..3] + 4) >> 3
//   angular: the reference row (modes 18..34) or column (modes 2..17) is extended
//            to negative indices by projecting the other side through invAngle; each
//            pixel then takes the linear interpolation
//            ((32-f)*ref[i+1] + f*ref[i+2] + 16) >> 5 of the two reference pixels its
//            projection falls between, with i and f the integer and 1/32 parts of
//            (distance * intraPredAngle).
// The 35-mode set, the 32-step angle resolution and the weighted average of two
// reference pixels come from the design description; using the standard HEVC angle
// table and reference ordering, the corner estimate and leaving out the boundary
// filters are this design's choices.
//
// Purely combinational: pred_o is valid in the cycle mode_i and ref_i are.
// Pixel (y,x) of pred_o is in bits [8*(4*y+x) +: 8].
module intra_pred_4x4
  import h265_pkg::*;
(
  input  mode_t        mode_i,
  input  logic [127:0] ref_i,
  output logic [127:0] pred_o
);

  sint_t top  [0:7];
  sint_t left [0:7];
  sint_t corner;
  sint_t m, ang, inv, lim;
  logic vert;
  sint_t mainr [0:8];
  sint_t side  [0:8];
  sint_t ext   [0:13];   // reference index -4..9 stored at index+4

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      top[i]  = sint_t'(ref_i[8*i +: 8]);
      left[i] = sint_t'(ref_i[64 + 8*i +: 8]);
    end
    corner = (top[0] + left[0] + 1) >> 1;
  end

  // Reference row (vertical modes) or column (horizontal modes), extended to
  // negative indices by projecting the other side.
  always_comb begin
    sint_t sidx;
    sidx = 0;
    m    = sint_t'(mode_i);
    ang  = intra_angle(m);
    inv  = intra_inv_angle(m);
    vert = (m >= 18);
    lim  = (4 * ang) >>> 5;

    mainr[0] = corner;
    side[0]  = corner;
    for (int i = 1; i < 9; i++) begin
      mainr[i] = vert ? top[i-1]  : left[i-1];
      side[i]  = vert ? left[i-1] : top[i-1];
    end
    for (int k = 0; k < 9; k++) ext[k+4] = mainr[k];
    ext[13] = mainr[8];
    for (int k = -4; k < 0; k++) begin
      sidx = (k * inv + 128) >>> 8;
      if (sidx < 0) sidx = 0;
      if (sidx > 8) sidx = 8;
      ext[k+4] = (ang < 0 && lim < -1 && k >= lim) ? side[sidx] : 0;
    end
  end

  always_comb begin
    sint_t dc, pos, idx, fact, a, b, v;
    pred_o = '0;
    dc   = 0;
    pos  = 0;
    idx  = 0;
    fact = 0;
    a    = 0;
    b    = 0;
    v    = 0;

    if (m == 0) begin
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++)
          pred_o[8*(4*y+x) +: 8] = 8'(((3-x)*left[y] + (x+1)*top[4] + (3-y)*top[x] + (y+1)*left[4] + 4) >> 3);
    end else if (m == 1) begin
      dc = 4;
      for (int i = 0; i < 4; i++) dc += top[i] + left[i];
      for (int p = 0; p < 16; p++) pred_o[8*p +: 8] = 8'(dc >> 3);
    end else begin
      // i: distance from the reference (row for vertical modes, column otherwise)
      // j: position along the reference
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) begin
          pos  = (i + 1) * ang;
          idx  = pos >>> 5;
          fact = pos & 31;
          a    = ext[j + idx + 1 + 4];
          b    = ext[j + idx + 2 + 4];
          v    = (fact != 0) ? (((32 - fact) * a + fact * b + 16) >> 5) : a;
          if (vert) pred_o[8*(4*i+j) +: 8] = 8'(v);
          else      pred_o[8*(4*j+i) +: 8] = 8'(v);
        end
      end
    end
  end

endmodule
