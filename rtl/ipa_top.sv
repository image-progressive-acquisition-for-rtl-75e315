// ipa_top: progressive, adaptive acquisition of one image macro block.
//
// The block sits in a memory access interface in place of the plain address
// generator. Instead of reading all 17 x 17 pixels of a macro block, it reads a
// coarse grid first and then, level by level, reads more pixels only where the
// block content varies: a square block whose priority score
// (area * vertex value range) exceeds the threshold thr is split into four by
// sampling its edge midpoints and centre. Blocks that stay below the
// threshold are filled by bilinear interpolation. The result, sampled plus
// interpolated pixels, is left in the local buffer for a client to read.
//
// Structure (as in the paper's block diagram): the refine unit scores the
// blocks of the current level from FIFO_A and sorts them into FIFO_C (to be
// sampled) and FIFO_D (to be interpolated); the address translator turns
// FIFO_C blocks into pixel requests (FIFO_E, to the memory interface) and
// child blocks (FIFO_B); NUM_INTERP interpolation units drain FIFO_D; the
// state machine swaps FIFO_A and FIFO_B through the connection interchange at
// the end of every iteration. The local buffer (canvas) is included here so
// that the block is complete; the memory, its command generator and the
// client are outside.
//
// Memory side: req_valid/req_ready/req_pos is a valid-ready stream of pixel
// positions inside the macro block (x = column, y = row, 0..16). The memory
// side returns each pixel with resp_valid, its position resp_pos and the
// value resp_data, in any order and with any latency (this return format is
// this design's choice; the paper leaves the rest of the interface as it is).
// Each request also carries its DRAM page and column (req_page, req_col),
// worked out by addr_map for the macro block at (mb_x, mb_y) under the linear
// or block storage layout chosen by MAPPING. mb_x / mb_y are captured when
// start is taken.
//
// Control: pulse start with thr set; busy stays high until the one-cycle done
// pulse; sampling_done goes high when no more memory reads will be issued,
// from then on the memory is free for others. thr is captured at the start of
// every iteration, so it may be raised during an acquisition. After done, the
// client reads any pixel combinationally through cl_pos / cl_data.
module ipa_top
  import ipa_pkg::*;
#(
  parameter int unsigned NUM_INTERP = 2,
  parameter int unsigned INIT_LVL   = MAX_LVL,
  parameter int unsigned AB_DEPTH   = 64,
  parameter int unsigned C_DEPTH    = 16,
  parameter int unsigned D_DEPTH    = 16,
  parameter int unsigned E_DEPTH    = 16,
  parameter int unsigned MAPPING    = 1,   // 0 linear, 1 block
  parameter int unsigned MB_PER_ROW = 31   // macro blocks per image row
) (
  input  logic        clk,
  input  logic        rst_n,
  // control
  input  logic        start,
  input  score_t      thr,
  input  logic [7:0]  mb_x,
  input  logic [7:0]  mb_y,
  output logic        busy,
  output logic        sampling_done,
  output logic        done,
  // pixel requests to the memory interface
  output logic        req_valid,
  input  logic        req_ready,
  output pos_t        req_pos,
  output logic [15:0] req_page,
  output logic [15:0] req_col,
  // pixels returned by the memory interface
  input  logic        resp_valid,
  input  pos_t        resp_pos,
  input  pix_t        resp_data,
  // client read port of the local buffer
  input  pos_t        cl_pos,
  output pix_t        cl_data,
  output logic        cl_sampled,
  // status
  output logic [$clog2(NPIX+1)-1:0] n_sampled,
  output logic [3:0]  n_iter,
  output lvl_t        lvl
);

  localparam int unsigned NRD = 4 + 4 * NUM_INTERP + 1;

  // ---------------- control ----------------
  logic   clr, seed, refine_en, switch_sig;
  score_t thr_q;
  logic   refine_idle, trans_idle;
  logic   req_pop;
  logic [NUM_INTERP-1:0] i_busy, i_en;
  logic [15:0] outstanding;

  // ---------------- queues ----------------
  block_t q0_din, q0_dout, q1_din, q1_dout;
  logic   q0_wr, q0_rd, q0_full, q0_empty;
  logic   q1_wr, q1_rd, q1_full, q1_empty;
  block_t a_dout, b_din;
  logic   a_rd, a_empty, b_wr, b_full;

  block_t c_din, c_dout;
  logic   c_wr, c_rd, c_full, c_empty;
  block_t d_din, d_dout;
  logic   d_wr, d_full, d_empty;
  logic [NUM_INTERP-1:0] d_rd;
  pos_t   e_din, e_dout;
  logic   e_wr, e_full, e_empty;

  // ---------------- canvas ----------------
  pos_t [NRD-1:0]        rd_pos;
  pix_t [NRD-1:0]        rd_data;
  logic [NRD-1:0]        rd_sampled;
  logic [NUM_INTERP-1:0] iw_en;
  pos_t [NUM_INTERP-1:0] iw_pos;
  lvl_t [NUM_INTERP-1:0] iw_lvl;
  pix_t [NUM_INTERP-1:0] iw_data;

  state_machine #(.INIT_LVL(INIT_LVL)) u_sm (
    .clk, .rst_n, .start, .thr_in(thr),
    .a_empty, .refine_idle, .c_empty, .trans_idle, .e_empty, .d_empty,
    .interp_idle(i_busy == '0), .req_pop, .resp_valid,
    .clr, .seed, .refine_en, .switch_sig, .thr(thr_q), .lvl, .busy,
    .sampling_done, .done, .n_iter, .outstanding
  );

  sync_fifo #(.WIDTH(BLOCK_W), .DEPTH(AB_DEPTH)) u_fifo_q0 (
    .clk, .rst_n, .clr, .wr_en(q0_wr), .din(q0_din), .rd_en(q0_rd),
    .dout(q0_dout), .full(q0_full), .empty(q0_empty), .count()
  );
  sync_fifo #(.WIDTH(BLOCK_W), .DEPTH(AB_DEPTH)) u_fifo_q1 (
    .clk, .rst_n, .clr, .wr_en(q1_wr), .din(q1_din), .rd_en(q1_rd),
    .dout(q1_dout), .full(q1_full), .empty(q1_empty), .count()
  );

  conn_interchange u_xchg (
    .switch_sel(switch_sig),
    .a_rd_en(a_rd), .a_dout, .a_empty,
    .b_wr_en(b_wr), .b_din, .b_full,
    .q0_wr_en(q0_wr), .q0_din, .q0_rd_en(q0_rd), .q0_dout, .q0_full, .q0_empty,
    .q1_wr_en(q1_wr), .q1_din, .q1_rd_en(q1_rd), .q1_dout, .q1_full, .q1_empty
  );

  refine_unit u_refine (
    .clk, .rst_n, .en(refine_en), .thr(thr_q),
    .a_dout, .a_empty, .a_rd_en(a_rd),
    .v_pos(rd_pos[3:0]), .v_data(rd_data[3:0]),
    .c_wr_en(c_wr), .c_din, .c_full,
    .d_wr_en(d_wr), .d_din, .d_full,
    .idle(refine_idle), .score()
  );

  sync_fifo #(.WIDTH(BLOCK_W), .DEPTH(C_DEPTH)) u_fifo_c (
    .clk, .rst_n, .clr, .wr_en(c_wr), .din(c_din), .rd_en(c_rd),
    .dout(c_dout), .full(c_full), .empty(c_empty), .count()
  );

  addr_translator #(.INIT_LVL(INIT_LVL)) u_trans (
    .clk, .rst_n, .clr, .seed,
    .c_dout, .c_empty, .c_rd_en(c_rd),
    .e_wr_en(e_wr), .e_din, .e_full,
    .b_wr_en(b_wr), .b_din, .b_full,
    .idle(trans_idle)
  );

  sync_fifo #(.WIDTH(POS_W), .DEPTH(E_DEPTH)) u_fifo_e (
    .clk, .rst_n, .clr, .wr_en(e_wr), .din(e_din), .rd_en(req_pop),
    .dout(e_dout), .full(e_full), .empty(e_empty), .count()
  );

  assign req_valid = !e_empty;
  assign req_pos   = e_dout;
  assign req_pop   = req_valid && req_ready;

  logic [7:0] mb_x_q, mb_y_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mb_x_q <= '0;
      mb_y_q <= '0;
    end else if (start && !busy) begin
      mb_x_q <= mb_x;
      mb_y_q <= mb_y;
    end
  end

  addr_map #(.MAPPING(MAPPING), .MB_PER_ROW(MB_PER_ROW)) u_amap (
    .mb_x(mb_x_q), .mb_y(mb_y_q), .pos(e_dout), .page(req_page), .col(req_col)
  );

  sync_fifo #(.WIDTH(BLOCK_W), .DEPTH(D_DEPTH)) u_fifo_d (
    .clk, .rst_n, .clr, .wr_en(d_wr), .din(d_din), .rd_en(|d_rd),
    .dout(d_dout), .full(d_full), .empty(d_empty), .count()
  );

  for (genvar g = 0; g < NUM_INTERP; g++) begin : g_interp
    // Unit g may take a block only while all units before it are busy.
    if (g == 0) begin : g_first
      assign i_en[g] = 1'b1;
    end else begin : g_next
      assign i_en[g] = &i_busy[g-1:0];
    end
    interp_unit u_interp (
      .clk, .rst_n, .en(i_en[g]),
      .d_dout, .d_empty, .d_rd_en(d_rd[g]),
      .c_pos(rd_pos[4 + 4*g +: 4]), .c_data(rd_data[4 + 4*g +: 4]),
      .w_en(iw_en[g]), .w_pos(iw_pos[g]), .w_lvl(iw_lvl[g]), .w_data(iw_data[g]),
      .busy(i_busy[g])
    );
  end

  assign rd_pos[NRD-1] = cl_pos;
  assign cl_data       = rd_data[NRD-1];
  assign cl_sampled    = rd_sampled[NRD-1];

  local_buffer #(.NRD(NRD), .NWI(NUM_INTERP)) u_canvas (
    .clk, .rst_n, .clr,
    .s_we(resp_valid), .s_pos(resp_pos), .s_data(resp_data),
    .i_we(iw_en), .i_pos(iw_pos), .i_lvl(iw_lvl), .i_data(iw_data),
    .rd_pos, .rd_data, .rd_sampled, .n_sampled
  );

  // Every read has returned by the time the canvas is reported complete.
  a_reads_done: assert property (@(posedge clk) disable iff (!rst_n)
                                 done |-> outstanding == '0)
    else $error("ipa_top: done with reads still in flight");

  // At most one interpolation unit takes a block in any cycle.
  a_single_pop: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(d_rd))
    else $error("ipa_top: two interpolation units popped FIFO_D together");

endmodule
