// refine_unit: decides, block by block, whether a block must be sampled more
// finely or is good enough to be interpolated.
//
// For each block taken from FIFO_A it reads the four vertex pixels from the
// canvas and computes the priority score of the paper's adaptive sampling,
//   score = area(block) * (max(vertex values) - min(vertex values)),
// with area = side * side = 4**lvl, i.e. the pixel range shifted left by
// 2*lvl. A block whose score is higher than the threshold goes to FIFO_C (to
// be refined and sampled); any other block goes to FIFO_D (to be
// interpolated). The score formula, the strict "higher than threshold" test and
// the two output queues follow the paper; the two-cycle sequencing is this
// design's choice.
//
// Timing: two cycles per block when the output queue has room. Cycle 1 pops
// the block from FIFO_A (show-ahead data) and registers it; cycle 2 reads the
// vertices combinationally from the canvas, scores the block and pushes it.
// A full output queue holds the unit in cycle 2. New blocks are only taken
// while en is high. idle is high when no block is held.
module refine_unit
  import ipa_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  score_t       thr,
  // FIFO_A read side
  input  block_t       a_dout,
  input  logic         a_empty,
  output logic         a_rd_en,
  // canvas reads of the four vertices
  output pos_t [3:0]   v_pos,
  input  pix_t [3:0]   v_data,
  // FIFO_C: blocks to be sampled
  output logic         c_wr_en,
  output block_t       c_din,
  input  logic         c_full,
  // FIFO_D: blocks to be interpolated
  output logic         d_wr_en,
  output block_t       d_din,
  input  logic         d_full,
  output logic         idle,
  output score_t       score     // score of the block held in cycle 2
);

  typedef enum logic {S_TAKE, S_EVAL} state_t;

  state_t state;
  block_t blk;
  pix_t   vmax, vmin, range;
  logic   refine;
  logic [MAX_LVL:0] side;

  assign side = (MAX_LVL+1)'(1) << blk.lvl;

  // Vertices: (x,y), (x+s,y), (x,y+s), (x+s,y+s)
  assign v_pos[0] = mk_pos(blk.x,        blk.y);
  assign v_pos[1] = mk_pos(blk.x + side, blk.y);
  assign v_pos[2] = mk_pos(blk.x,        blk.y + side);
  assign v_pos[3] = mk_pos(blk.x + side, blk.y + side);

  always_comb begin
    vmax = v_data[0];
    vmin = v_data[0];
    for (int k = 1; k < 4; k++) begin
      if (v_data[k] > vmax) vmax = v_data[k];
      if (v_data[k] < vmin) vmin = v_data[k];
    end
    range  = vmax - vmin;
    score  = score_t'(range) << (2 * blk.lvl);
    refine = (score > thr);
  end

  assign idle    = (state == S_TAKE);
  assign a_rd_en = (state == S_TAKE) && en && !a_empty;
  assign c_din   = blk;
  assign d_din   = blk;
  assign c_wr_en = (state == S_EVAL) &&  refine && !c_full;
  assign d_wr_en = (state == S_EVAL) && !refine && !d_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_TAKE;
      blk   <= '0;
    end else begin
      case (state)
        S_TAKE: if (a_rd_en) begin
          blk   <= a_dout;
          state <= S_EVAL;
        end
        S_EVAL: if (c_wr_en || d_wr_en) state <= S_TAKE;
        default: state <= S_TAKE;
      endcase
    end
  end

endmodule
