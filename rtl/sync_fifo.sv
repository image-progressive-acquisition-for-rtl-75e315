// sync_fifo: single-clock first-in first-out queue.
//
// One module serves all five queues of the acquisition block: FIFO_A and
// FIFO_B (block lists of the current and the next iteration, swapped between
// iterations), FIFO_C (blocks to be sampled), FIFO_D (blocks to be
// interpolated) and FIFO_E (pixels to be sampled). The paper gives their roles
// and their data_in / data_out / wr_en / rd_en pins; depth, show-ahead read and
// the synchronous clear are this design's choices.
//
// Interface: wr_en pushes din at the clock edge unless the queue is full;
// dout always shows the oldest entry (show-ahead), and rd_en removes it at the
// clock edge unless the queue is empty. clr empties the queue in one cycle.
// A push and a pop may happen in the same cycle. count, full and empty are
// registered-state outputs, valid in the cycle after the edge that changed them.
module sync_fifo #(
  parameter int unsigned WIDTH = 13,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           din,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           dout,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign dout  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  // The users of the queues must never push into a full queue or pop an
  // empty one: every producer in the design waits on full, every consumer on
  // empty.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n || clr)
                                  !(wr_en && full))
    else $error("sync_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clr)
                                   !(rd_en && empty))
    else $error("sync_fifo: pop while empty");

endmodule
