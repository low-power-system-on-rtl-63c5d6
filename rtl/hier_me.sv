// Hierarchical motion estimation of one 4x4 block inside an 8x8 reference window.
//
// Three stages, one SAD evaluation per clock:
//   FULL    : the 4x4 current block is matched at all 5x5 positions (x,y = 0..4) of
//             the window, row by row (y outer, x inner); a strictly smaller SAD
//             replaces the best position, so the first of equal minima is kept.
//   HALF    : the current block and the best-matching 4x4 window region are both
//             reduced to 2x2 by averaging each 2x2 group of pixels (sum >> 2); their
//             SAD is taken.
//   QUARTER : both 2x2 blocks are reduced to one pixel (mean of the four, >> 2) and
//             their absolute difference is taken.
// After HALF and after QUARTER the running minimum min_sad_o is replaced when the
// coarse SAD is smaller. A 2x2 (or 1x1) block in a 2x2 (or 1x1) region has one
// position only, so the coarse stages confirm the full-resolution position and never
// move it. The stage order, the 5x5 positions, averaging by groups of four, the
// min-SAD update rule and the reset values (position 0,0 and the largest SAD) follow
// the design description; the one-position-per-clock schedule and the per-stage SAD
// outputs are this design's.
//
// Timing: start_i is sampled on a rising edge while idle; busy_o is then high and
// done_o rises 27 clocks after that edge for one clock (25 full-resolution clocks,
// one half, one quarter). best_x_o / best_y_o / min_sad_o / sad_*_o are valid from
// done_o until the next start. cur_i and ref_i must stay stable while busy_o is high.
// Pixel (y,x) of cur_i is in bits [8*(4*y+x) +: 8], of ref_i in [8*(8*y+x) +: 8].
// Asynchronous active-low reset, so the block may run from a gated clock.
module hier_me
  import h265_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start_i,
  input  logic [127:0] cur_i,
  input  logic [511:0] ref_i,
  output logic         busy_o,
  output logic         done_o,
  output logic [2:0]   best_x_o,
  output logic [2:0]   best_y_o,
  output sad_t         min_sad_o,
  output sad_t         sad_full_o,
  output sad_t         sad_half_o,
  output sad_t         sad_quarter_o
);

  typedef enum logic [2:0] {S_IDLE, S_FULL, S_HALF, S_QUARTER, S_DONE} state_e;

  state_e     state;
  logic [2:0] pos_x, pos_y;

  // Candidate region: the scanned position during FULL, the best one afterwards.
  logic [2:0]   cx, cy;
  logic [127:0] cand;
  sad_t         cand_sad;

  assign cx = (state == S_FULL) ? pos_x : best_x_o;
  assign cy = (state == S_FULL) ? pos_y : best_y_o;

  always_comb begin
    cand = '0;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++)
        cand[8*(4*y+x) +: 8] = ref_i[8*(8*(int'(cy)+y) + int'(cx) + x) +: 8];
  end

  sad4x4 u_sad (.a_i(cur_i), .b_i(cand), .sad_o(cand_sad));

  // Half resolution: 2x2 averages of the current block and of the candidate.
  logic [7:0] cur_h [4];
  logic [7:0] cand_h[4];
  sad_t       half_sad, quarter_sad;
  logic [7:0] cur_q, cand_q;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < 2; j++) begin
        cur_h[2*i+j]  = 8'((10'(cur_i[8*(4*(2*i)+2*j) +: 8])   + 10'(cur_i[8*(4*(2*i)+2*j+1) +: 8])
                          + 10'(cur_i[8*(4*(2*i+1)+2*j) +: 8]) + 10'(cur_i[8*(4*(2*i+1)+2*j+1) +: 8])) >> 2);
        cand_h[2*i+j] = 8'((10'(cand[8*(4*(2*i)+2*j) +: 8])    + 10'(cand[8*(4*(2*i)+2*j+1) +: 8])
                          + 10'(cand[8*(4*(2*i+1)+2*j) +: 8])  + 10'(cand[8*(4*(2*i+1)+2*j+1) +: 8])) >> 2);
      end
    end
    half_sad = '0;
    for (int k = 0; k < 4; k++)
      half_sad = half_sad + sad_t'(8'((cur_h[k] > cand_h[k]) ? (cur_h[k] - cand_h[k]) : (cand_h[k] - cur_h[k])));
    cur_q  = 8'((10'(cur_h[0])  + 10'(cur_h[1])  + 10'(cur_h[2])  + 10'(cur_h[3]))  >> 2);
    cand_q = 8'((10'(cand_h[0]) + 10'(cand_h[1]) + 10'(cand_h[2]) + 10'(cand_h[3])) >> 2);
    quarter_sad = sad_t'(8'((cur_q > cand_q) ? (cur_q - cand_q) : (cand_q - cur_q)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      pos_x         <= '0;
      pos_y         <= '0;
      best_x_o      <= '0;
      best_y_o      <= '0;
      min_sad_o     <= '1;
      sad_full_o    <= '1;
      sad_half_o    <= '1;
      sad_quarter_o <= '1;
    end else begin
      unique case (state)
        S_IDLE: if (start_i) begin
          state         <= S_FULL;
          pos_x         <= '0;
          pos_y         <= '0;
          best_x_o      <= '0;
          best_y_o      <= '0;
          min_sad_o     <= '1;
          sad_full_o    <= '1;
          sad_half_o    <= '1;
          sad_quarter_o <= '1;
        end
        S_FULL: begin
          if (cand_sad < min_sad_o) begin
            min_sad_o  <= cand_sad;
            sad_full_o <= cand_sad;
            best_x_o   <= pos_x;
            best_y_o   <= pos_y;
          end
          if (pos_x == 3'd4) begin
            pos_x <= '0;
            if (pos_y == 3'd4) state <= S_HALF;
            else               pos_y <= pos_y + 3'd1;
          end else begin
            pos_x <= pos_x + 3'd1;
          end
        end
        S_HALF: begin
          sad_half_o <= half_sad;
          if (half_sad < min_sad_o) min_sad_o <= half_sad;
          state <= S_QUARTER;
        end
        S_QUARTER: begin
          sad_quarter_o <= quarter_sad;
          if (quarter_sad < min_sad_o) min_sad_o <= quarter_sad;
          state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);
  assign done_o = (state == S_DONE);

`ifndef SYNTHESIS
  // The full-resolution scan never leaves the 5x5 position grid.
  a_pos_range: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == S_FULL) |-> (pos_x <= 3'd4 && pos_y <= 3'd4));
`endif

endmodule
