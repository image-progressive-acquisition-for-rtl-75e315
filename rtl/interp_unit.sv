// interp_unit: fills the missing pixels of one block by bilinear interpolation.
//
// A block in FIFO_D has its four vertices sampled and is judged smooth enough
// not to be refined further. The unit takes such a block, reads its corner
// values p00 (x,y), p10 (x+s,y), p01 (x,y+s) and p11 (x+s,y+s) from the canvas,
// and writes, for every pixel (x+i, y+j) with 0 <= i,j <= s,
//   ((s-i)(s-j) p00 + i(s-j) p10 + (s-i) j p01 + i j p11 + s*s/2) / (s*s)
// into the canvas. The side s is a power of two, so the division is a shift by
// 2*lvl, rounded to nearest. Each write carries the block level; the canvas
// keeps sampled pixels and lets the finest block win on shared edges. Bilinear interpolation, the FIFO_D input and the
// busy -> en chaining between units follow the paper; the pixel order, the
// rounding and the one-pixel-per-cycle rate are this design's choices.
//
// Several units share FIFO_D. A unit may take a block only while en is high;
// chaining en of unit k to the AND of busy of units 0..k-1 lets exactly one
// idle unit take the next block.
//
// Timing: one cycle to pop the block, one cycle to load the corners, then one
// pixel per cycle, row by row: (s+1)**2 + 2 cycles per block. busy is high from
// the cycle after the pop until the last pixel has been written.
module interp_unit
  import ipa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  // FIFO_D: blocks to be interpolated
  input  block_t     d_dout,
  input  logic       d_empty,
  output logic       d_rd_en,
  // canvas reads of the four corners
  output pos_t [3:0] c_pos,
  input  pix_t [3:0] c_data,
  // canvas write
  output logic       w_en,
  output pos_t       w_pos,
  output lvl_t       w_lvl,
  output pix_t       w_data,
  output logic       busy
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_t;

  localparam int AW = 2 * MAX_LVL + PW + 2;   // accumulator width

  state_t state;
  block_t blk;
  pix_t   p [4];
  logic [MAX_LVL:0] i, j, side;
  logic [AW-1:0]    acc;

  assign side = (MAX_LVL+1)'(1) << blk.lvl;

  assign c_pos[0] = mk_pos(blk.x,        blk.y);
  assign c_pos[1] = mk_pos(blk.x + side, blk.y);
  assign c_pos[2] = mk_pos(blk.x,        blk.y + side);
  assign c_pos[3] = mk_pos(blk.x + side, blk.y + side);

  always_comb begin
    logic [MAX_LVL:0] ii, jj;
    ii  = side - i;
    jj  = side - j;
    acc = AW'(int'(ii) * int'(jj) * int'(p[0]) + int'(i) * int'(jj) * int'(p[1]) +
              int'(ii) * int'(j) * int'(p[2]) + int'(i) * int'(j) * int'(p[3]) +
              ((1 << (2 * int'(blk.lvl))) >> 1));
  end

  assign d_rd_en = (state == S_IDLE) && en && !d_empty;
  assign busy    = (state != S_IDLE);
  assign w_en    = (state == S_RUN);
  assign w_pos   = mk_pos(blk.x + i, blk.y + j);
  assign w_lvl   = blk.lvl;
  assign w_data  = pix_t'(acc >> (2 * blk.lvl));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      blk   <= '0;
      i     <= '0;
      j     <= '0;
      for (int k = 0; k < 4; k++) p[k] <= '0;
    end else begin
      case (state)
        S_IDLE: if (d_rd_en) begin
          blk   <= d_dout;
          state <= S_LOAD;
        end
        S_LOAD: begin
          for (int k = 0; k < 4; k++) p[k] <= c_data[k];
          i     <= '0;
          j     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (i == side) begin
            i <= '0;
            if (j == side) state <= S_IDLE;
            else           j <= j + 1'b1;
          end else begin
            i <= i + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
