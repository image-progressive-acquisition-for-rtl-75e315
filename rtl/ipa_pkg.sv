// ipa_pkg: types and constants shared by the progressive image acquisition
// (IPA) block.
//
// The block samples one square macro block of MB_SIZE x MB_SIZE pixels
// (17 x 17, 8-bit grey levels) from external memory. Inside the macro block
// the work is organised in square sub-blocks: a sub-block is identified by its
// anchor (upper-left pixel) and its level, the log2 of its side length in
// pixels, so a level-L block spans the pixels anchor .. anchor + 2**L on each
// axis and its four vertices are sampled pixels. The macro block size, pixel
// width and the block description (anchor plus level) follow the paper; the
// bit widths are derived from them.
package ipa_pkg;

  // Largest block level: side 2**MAX_LVL = 16, so a macro block is 17 x 17.
  localparam int MAX_LVL = 4;
  localparam int MB_SIZE = (1 << MAX_LVL) + 1;
  localparam int NPIX    = MB_SIZE * MB_SIZE;

  localparam int CW = $clog2(MB_SIZE);      // coordinate width (5)
  localparam int LW = $clog2(MAX_LVL + 1);  // level width (3)
  localparam int PW = 8;                    // pixel width

  // Priority score = area * (max - min) = 4**lvl * range, at most 256 * 255.
  localparam int SCORE_W = 2 * MAX_LVL + PW;

  typedef logic [CW-1:0]      coord_t;
  typedef logic [LW-1:0]      lvl_t;
  typedef logic [PW-1:0]      pix_t;
  typedef logic [SCORE_W-1:0] score_t;

  // Pixel position inside the macro block.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } pos_t;

  // A block: anchor (upper-left pixel) and level (side = 2**lvl).
  typedef struct packed {
    coord_t x;
    coord_t y;
    lvl_t   lvl;
  } block_t;

  localparam int POS_W   = $bits(pos_t);
  localparam int BLOCK_W = $bits(block_t);

  // Linear index of a pixel in the macro block, row major.
  function automatic int unsigned pix_index(pos_t p);
    return int'(p.y) * MB_SIZE + int'(p.x);
  endfunction

  function automatic pos_t mk_pos(coord_t x, coord_t y);
    pos_t p;
    p.x = x;
    p.y = y;
    return p;
  endfunction

endpackage
