// Sum of absolute differences of two 4x4 blocks of 8-bit pixels.
//
// Sixteen absolute differences are formed side by side and summed in one adder
// tree; the result (at most 16 * 255 = 4080) is 12 bits wide. Both the adaptive
// intra engine (one per candidate mode) and the motion estimator (one per candidate
// position) use it as their matching cost, as the design prescribes; the
// single-cycle, fully parallel form is this design's choice.
//
// Purely combinational. Pixel (y,x) of either block is in bits [8*(4*y+x) +: 8].
module sad4x4
  import h265_pkg::*;
(
  input  logic [127:0] a_i,
  input  logic [127:0] b_i,
  output sad_t         sad_o
);

  always_comb begin
    sad_o = '0;
    for (int i = 0; i < 16; i++) begin
      logic [7:0] pa, pb;
      pa = a_i[8*i +: 8];
      pb = b_i[8*i +: 8];
      sad_o = sad_o + sad_t'(8'((pa > pb) ? (pa - pb) : (pb - pa)));
    end
  end

endmodule
