// conn_interchange: swaps the roles of the two physical block queues.
//
// The refine unit always reads "FIFO_A" (blocks of the current iteration) and
// the address translator always writes "FIFO_B" (child blocks for the next
// iteration). Two physical queues, q0 and q1, play these roles in turn: with
// switch_sel = 0, q0 is FIFO_A and q1 is FIFO_B; with switch_sel = 1 the roles
// are exchanged. Flipping switch_sel between iterations therefore turns the
// blocks just produced into the blocks to be checked next, without copying.
// The swap driven by the state machine's switch signal is as the paper
// describes it; the select polarity is this design's choice.
//
// Purely combinational. The unused side of each queue is held idle (no push
// into the queue being read, no pop from the queue being written).
module conn_interchange
  import ipa_pkg::*;
(
  input  logic   switch_sel,
  // logical FIFO_A: read side, used by the refine unit
  input  logic   a_rd_en,
  output block_t a_dout,
  output logic   a_empty,
  // logical FIFO_B: write side, used by the address translator
  input  logic   b_wr_en,
  input  block_t b_din,
  output logic   b_full,
  // physical queue 0
  output logic   q0_wr_en,
  output block_t q0_din,
  output logic   q0_rd_en,
  input  block_t q0_dout,
  input  logic   q0_full,
  input  logic   q0_empty,
  // physical queue 1
  output logic   q1_wr_en,
  output block_t q1_din,
  output logic   q1_rd_en,
  input  block_t q1_dout,
  input  logic   q1_full,
  input  logic   q1_empty
);

  always_comb begin
    q0_din = b_din;
    q1_din = b_din;
    if (!switch_sel) begin
      // q0 = FIFO_A, q1 = FIFO_B
      a_dout   = q0_dout;
      a_empty  = q0_empty;
      q0_rd_en = a_rd_en;
      q0_wr_en = 1'b0;
      b_full   = q1_full;
      q1_wr_en = b_wr_en;
      q1_rd_en = 1'b0;
    end else begin
      // q1 = FIFO_A, q0 = FIFO_B
      a_dout   = q1_dout;
      a_empty  = q1_empty;
      q1_rd_en = a_rd_en;
      q1_wr_en = 1'b0;
      b_full   = q0_full;
      q0_wr_en = b_wr_en;
      q0_rd_en = 1'b0;
    end
  end

endmodule
