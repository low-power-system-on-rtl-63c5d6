// Shared types and constants of the 4x4 intra / hierarchical motion estimation core.
//
// Pixels are 8-bit luma samples. A 4x4 block travels as a 128-bit vector, pixel
// (row y, column x) in bits [8*(4*y+x) +: 8], so row 0 sits in the least significant
// 32 bits. An 8x8 motion search window travels the same way as a 512-bit vector,
// pixel (y, x) in bits [8*(8*y+x) +: 8].
//
// The thresholds are the ones the design is built around: a gradient above 128 marks
// an edge, a neighbour-difference energy below 1000 marks a smooth block and one
// above 5000 a detailed block. The intra angle table is the HEVC intraPredAngle /
// invAngle table for modes 2..34.
package h265_pkg;

  localparam int unsigned NUM_INTRA_MODES = 35;
  localparam int unsigned MODE_W          = 6;    // mode number 0..34
  localparam int unsigned BLK             = 4;    // intra and ME block edge
  localparam int unsigned WIN             = 8;    // ME search window edge
  localparam int unsigned SAD_W           = 12;   // 16 * 255 = 4080 fits in 12 bits

  localparam int EDGE_THRESHOLD     = 128;
  localparam int SMOOTH_THRESHOLD   = 1000;
  localparam int DETAILED_THRESHOLD = 5000;

  localparam logic [MODE_W-1:0] MODE_PLANAR = 6'd0;
  localparam logic [MODE_W-1:0] MODE_DC     = 6'd1;

  typedef logic [7:0] pixel_t;
  typedef logic signed [31:0] sint_t;   // 4-state signed working integer
  typedef logic [SAD_W-1:0] sad_t;
  typedef logic [MODE_W-1:0] mode_t;

  // Which mode family the adaptive intra engine runs for a block.
  typedef enum logic [1:0] {
    GRP_SMOOTH = 2'd0,  // planar and DC only
    GRP_HORIZ  = 2'd1,  // angular modes 2..17
    GRP_VERT   = 2'd2,  // angular modes 18..34
    GRP_ALL    = 2'd3   // all 35 modes
  } mode_group_e;

  // HEVC intraPredAngle for angular modes 2..34 (0 for planar and DC).
  function automatic int intra_angle(input int mode);
    case (mode)
      2, 34:  return 32;
      3, 33:  return 26;
      4, 32:  return 21;
      5, 31:  return 17;
      6, 30:  return 13;
      7, 29:  return 9;
      8, 28:  return 5;
      9, 27:  return 2;
      10, 26: return 0;
      11, 25: return -2;
      12, 24: return -5;
      13, 23: return -9;
      14, 22: return -13;
      15, 21: return -17;
      16, 20: return -21;
      17, 19: return -26;
      18:     return -32;
      default: return 0;
    endcase
  endfunction

  // HEVC invAngle for the negative-angle modes 11..25 (0 elsewhere).
  function automatic int intra_inv_angle(input int mode);
    case (mode)
      11, 25: return -4096;
      12, 24: return -1638;
      13, 23: return -910;
      14, 22: return -630;
      15, 21: return -482;
      16, 20: return -390;
      17, 19: return -315;
      18:     return -256;
      default: return 0;
    endcase
  endfunction

endpackage
