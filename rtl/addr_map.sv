// addr_map: turns a pixel position inside a macro block into a DRAM page
// (row) and column address, for the two storage layouts the paper compares.
//
//   MAPPING = 0, linear: every image row is one page. The page is the image
//     row, mb_y * 17 + y; the column is the image column, mb_x * 17 + x.
//   MAPPING = 1, block: every 17 x 17 macro block is one page. The page is
//     the macro block number, mb_y * MB_PER_ROW + mb_x; the column is the
//     row-major offset inside the block, y * 17 + x.
//
// mb_x / mb_y are the column and row of the macro block in the image, counted
// in macro blocks. One pixel occupies one column (8-bit pixels). How a page
// number is split into DRAM bank and row bits is left to the command
// generator. Purely combinational.
module addr_map
  import ipa_pkg::*;
#(
  parameter int unsigned MAPPING    = 1,
  parameter int unsigned MB_PER_ROW = 31
) (
  input  logic [7:0]  mb_x,
  input  logic [7:0]  mb_y,
  input  pos_t        pos,
  output logic [15:0] page,
  output logic [15:0] col
);

  localparam logic [15:0] MBS  = 16'(MB_SIZE);
  localparam logic [15:0] MBPR = 16'(MB_PER_ROW);

  logic [15:0] px, py;
  assign px = 16'(pos.x);
  assign py = 16'(pos.y);

  if (MAPPING == 0) begin : g_linear
    assign page = 16'(mb_y) * MBS + py;
    assign col  = 16'(mb_x) * MBS + px;
  end else begin : g_block
    assign page = 16'(mb_y) * MBPR + 16'(mb_x);
    assign col  = py * MBS + px;
  end

endmodule
