// local_buffer: the canvas that holds the macro block being acquired.
//
// Every pixel carries a small tag: 0 once the pixel has been sampled from
// memory, otherwise the level of the finest block whose interpolation wrote
// it, or all ones while it holds nothing. Pixels sampled from external memory
// arrive through the sample port and always win. Interpolated pixels arrive
// through NWI interpolation write ports, each with the level of its block, and
// are stored only if that level is not coarser than the pixel's tag. A pixel
// on the edge of two blocks thus ends up with the value of the finer block,
// whatever order the blocks are interpolated in; two blocks of the same level
// give the same value on their common edge, since bilinear interpolation along
// an edge depends only on the edge's two end points. NRD combinational read
// ports serve the refine unit (block vertices), the interpolation units (block
// corners) and the client.
//
// The paper places this buffer between the acquisition block and the client
// and has the block write both samples and reconstructed pixels into it; the
// port set, the tags and the write priority are this design's choices.
//
// Timing: writes take effect at the clock edge; reads are combinational from
// the stored state. clr resets all tags in one cycle (pixel values are left as
// they are and get rewritten during the next acquisition). Among interpolation
// writes to one pixel in one cycle, the finest level wins, then the lowest
// port index; a sample write in the same cycle beats them all.
module local_buffer
  import ipa_pkg::*;
#(
  parameter int unsigned NRD = 4,
  parameter int unsigned NWI = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  // sample write port (data returned by memory)
  input  logic                 s_we,
  input  pos_t                 s_pos,
  input  pix_t                 s_data,
  // interpolation write ports
  input  logic [NWI-1:0]       i_we,
  input  pos_t [NWI-1:0]       i_pos,
  input  lvl_t [NWI-1:0]       i_lvl,
  input  pix_t [NWI-1:0]       i_data,
  // read ports
  input  pos_t [NRD-1:0]       rd_pos,
  output pix_t [NRD-1:0]       rd_data,
  output logic [NRD-1:0]       rd_sampled,
  // number of pixels currently marked as sampled
  output logic [$clog2(NPIX+1)-1:0] n_sampled
);

  localparam lvl_t EMPTY = '1;

  pix_t pix [NPIX];
  lvl_t tag [NPIX];
  logic [NWI-1:0] i_win;

  // Interpolation port k writes if its level is not coarser than the stored
  // tag, no sample hits the same pixel, and no other port with priority over
  // it hits the same pixel.
  always_comb begin
    for (int k = 0; k < int'(NWI); k++) begin
      i_win[k] = i_we[k] && (i_lvl[k] <= tag[pix_index(i_pos[k])]) &&
                 !(s_we && s_pos == i_pos[k]);
      for (int m = 0; m < int'(NWI); m++) begin
        if (m != k && i_we[m] && i_pos[m] == i_pos[k] &&
            (i_lvl[m] < i_lvl[k] || (i_lvl[m] == i_lvl[k] && m < k)))
          i_win[k] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NPIX; n++) tag[n] <= EMPTY;
      n_sampled <= '0;
    end else if (clr) begin
      for (int n = 0; n < NPIX; n++) tag[n] <= EMPTY;
      n_sampled <= '0;
    end else begin
      for (int k = 0; k < int'(NWI); k++)
        if (i_win[k]) tag[pix_index(i_pos[k])] <= i_lvl[k];
      if (s_we) begin
        if (tag[pix_index(s_pos)] != '0) n_sampled <= n_sampled + 1'b1;
        tag[pix_index(s_pos)] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(NWI); k++)
      if (i_win[k]) pix[pix_index(i_pos[k])] <= i_data[k];
    if (s_we) pix[pix_index(s_pos)] <= s_data;
  end

  always_comb begin
    for (int r = 0; r < int'(NRD); r++) begin
      rd_data[r]    = pix[pix_index(rd_pos[r])];
      rd_sampled[r] = (tag[pix_index(rd_pos[r])] == '0);
    end
  end

endmodule
