// addr_translator: turns blocks into pixel positions to be read from memory.
//
// Refining a level-L block (side s = 2**L, half side h = s/2) needs the five
// pixels that split it into four level-(L-1) blocks: the midpoints of its four
// edges and its centre, (x+h,y), (x,y+h), (x+h,y+h), (x+s,y+h), (x+h,y+s).
// For each block taken from FIFO_C the translator pushes those pixel positions
// into FIFO_E, for the memory interface, and the four child blocks into the
// next-iteration queue (logical FIFO_B). Children of side 1 are not queued:
// all their pixels are sampled once their parent is refined.
// A midpoint on an edge shared by two refined neighbours would be requested
// twice; a one-bit-per-pixel record of requested positions suppresses the
// second request, so each pixel is read from memory at most once per
// acquisition.
//
// On seed, instead, the translator lays down the initial uniform grid: every
// pixel whose coordinates are multiples of 2**INIT_LVL goes to FIFO_E and every
// grid cell, at level INIT_LVL, goes to FIFO_B.
//
// The paper gives the unit's role, its queues and the child blocks; the
// pixel order, the duplicate suppression and the seeding are this design's
// choices.
//
// Timing: one step per cycle; in a step one pixel position (unless already
// requested) and one child block are pushed together, and the step waits while
// a queue it needs is full. A refined block takes one cycle to be taken from
// FIFO_C and five steps, six cycles in all; the seed takes one step
// per grid point. clr clears the requested record. idle is high between jobs.
module addr_translator
  import ipa_pkg::*;
#(
  parameter int unsigned INIT_LVL = MAX_LVL
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  logic   seed,
  // FIFO_C: blocks to be sampled
  input  block_t c_dout,
  input  logic   c_empty,
  output logic   c_rd_en,
  // FIFO_E: pixels to be sampled
  output logic   e_wr_en,
  output pos_t   e_din,
  input  logic   e_full,
  // logical FIFO_B: blocks of the next iteration
  output logic   b_wr_en,
  output block_t b_din,
  input  logic   b_full,
  output logic   idle
);

  localparam int unsigned ISTEP = 1 << INIT_LVL;

  typedef enum logic [1:0] {S_IDLE, S_SEED, S_REF} state_t;

  state_t          state;
  block_t          blk;
  logic [2:0]      k;
  coord_t          gx, gy;
  logic [NPIX-1:0] requested;

  logic [MAX_LVL:0] side, half;
  pos_t   cand;
  block_t child;
  logic   need_child, skip_pix, last, step_ok;

  assign side = (MAX_LVL+1)'(1) << blk.lvl;
  assign half = side >> 1;

  always_comb begin
    cand       = '0;
    child      = '0;
    need_child = 1'b0;
    last       = 1'b0;
    if (state == S_SEED) begin
      cand       = mk_pos(gx, gy);
      child.x    = gx;
      child.y    = gy;
      child.lvl  = lvl_t'(INIT_LVL);
      need_child = (int'(gx) < MB_SIZE - 1) && (int'(gy) < MB_SIZE - 1);
      last       = (int'(gx) + ISTEP >= MB_SIZE) && (int'(gy) + ISTEP >= MB_SIZE);
    end else begin
      case (k)
        3'd0:    cand = mk_pos(blk.x + half, blk.y);
        3'd1:    cand = mk_pos(blk.x,        blk.y + half);
        3'd2:    cand = mk_pos(blk.x + half, blk.y + half);
        3'd3:    cand = mk_pos(blk.x + side, blk.y + half);
        default: cand = mk_pos(blk.x + half, blk.y + side);
      endcase
      child.x    = (k[0]) ? coord_t'(blk.x + half) : blk.x;
      child.y    = (k[1]) ? coord_t'(blk.y + half) : blk.y;
      child.lvl  = blk.lvl - 1'b1;
      need_child = (k < 3'd4) && (blk.lvl > lvl_t'(1));
      last       = (k == 3'd4);
    end
  end

  assign skip_pix = requested[pix_index(cand)];
  assign step_ok  = (state != S_IDLE) && (skip_pix || !e_full) &&
                    (!need_child || !b_full);
  assign e_wr_en  = step_ok && !skip_pix;
  assign e_din    = cand;
  assign b_wr_en  = step_ok && need_child;
  assign b_din    = child;
  assign c_rd_en  = (state == S_IDLE) && !seed && !c_empty;
  assign idle     = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      blk       <= '0;
      k         <= '0;
      gx        <= '0;
      gy        <= '0;
      requested <= '0;
    end else begin
      if (clr) requested <= '0;
      else if (e_wr_en) requested[pix_index(cand)] <= 1'b1;
      case (state)
        S_IDLE: begin
          k <= '0;
          if (seed) begin
            gx    <= '0;
            gy    <= '0;
            state <= S_SEED;
          end else if (c_rd_en) begin
            blk   <= c_dout;
            state <= S_REF;
          end
        end
        S_SEED: if (step_ok) begin
          if (last) state <= S_IDLE;
          else if (int'(gx) + ISTEP >= MB_SIZE) begin
            gx <= '0;
            gy <= coord_t'(int'(gy) + ISTEP);
          end else begin
            gx <= coord_t'(int'(gx) + ISTEP);
          end
        end
        S_REF: if (step_ok) begin
          if (last) state <= S_IDLE;
          k <= k + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
