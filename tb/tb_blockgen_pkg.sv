// Stimulus generators shared by the testbenches: 4x4 blocks of a chosen texture
// class and reference pixel sets that resemble the block's surroundings.
package tb_blockgen_pkg;
  import tb_models_pkg::*;

  // kind 0: smooth, 1: vertical step (strong gx), 2: horizontal step (strong gy),
  // 3: random texture
  function automatic logic [127:0] gen_block(input int kind);
    blk_t b;
    int a  = $urandom_range(0, 120);
    int d  = $urandom_range(60, 135);
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        case (kind)
          0: b[y][x] = a + $urandom_range(0, 3);
          1: b[y][x] = (x >= 2) ? a + d : a;
          2: b[y][x] = (y >= 2) ? a + d : a;
          default: b[y][x] = $urandom_range(0, 255);
        endcase
    return pack_blk(b);
  endfunction

  // Reference pixels: the block's own first row / column values with noise,
  // so that some modes predict well and others do not.
  function automatic logic [127:0] gen_ref(input logic [127:0] cur);
    logic [127:0] r;
    for (int i = 0; i < 8; i++) begin
      int t = int'(cur[8*(i % 4) +: 8]) + $urandom_range(0, 6);
      int l = int'(cur[8*(4*(i % 4)) +: 8]) + $urandom_range(0, 6);
      r[8*i +: 8]      = 8'((t > 255) ? 255 : t);
      r[64 + 8*i +: 8] = 8'((l > 255) ? 255 : l);
    end
    return r;
  endfunction
endpackage
