// state_machine: sequences one macro-block acquisition.
//
// Phases: clear the canvas flags, the queues and the requested-pixel record;
// seed the initial uniform grid (the translator queues the grid pixels and the
// grid cells); then iterate. Each iteration checks every block of the current
// level (refine unit), samples the blocks that need it (address translator,
// memory interface) and collects their children. An iteration ends when the
// current block list is exhausted, all units are idle, the pixel queue is
// empty and every requested pixel has come back from memory, so the next
// iteration's scores only use pixels already in the canvas. The machine then
// toggles switch_sig, which swaps FIFO_A and FIFO_B, and moves one level down
// (halving the sampling step). When an iteration produced no child blocks
// sampling is over (sampling_done); the machine then waits until FIFO_D is
// empty and every interpolation unit is idle, and pulses done.
//
// The iteration structure, the halving of the step and the A/B switch follow
// the paper; the end-of-iteration condition, the outstanding-read counter, the
// per-iteration capture of the threshold (so that it may be raised between
// iterations) and the phase encoding are this design's choices.
//
// Timing: start is taken in IDLE. req_pop counts a pixel request accepted by
// the memory interface, resp_valid a pixel returned; both may occur in the same
// cycle. done is a one-cycle pulse; busy is high from start to done.
module state_machine
  import ipa_pkg::*;
#(
  parameter int unsigned INIT_LVL = MAX_LVL
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  score_t      thr_in,
  // status of the datapath
  input  logic        a_empty,
  input  logic        refine_idle,
  input  logic        c_empty,
  input  logic        trans_idle,
  input  logic        e_empty,
  input  logic        d_empty,
  input  logic        interp_idle,
  input  logic        req_pop,
  input  logic        resp_valid,
  // controls
  output logic        clr,
  output logic        seed,
  output logic        refine_en,
  output logic        switch_sig,
  output score_t      thr,
  output lvl_t        lvl,
  output logic        busy,
  output logic        sampling_done,
  output logic        done,
  output logic [3:0]  n_iter,
  output logic [15:0] outstanding
);

  typedef enum logic [2:0] {
    P_IDLE, P_CLEAR, P_SEED, P_SEED_WAIT, P_SWITCH, P_CHECK, P_ITER, P_INTERP
  } phase_t;

  phase_t phase;
  logic   first;
  logic   sample_quiet;

  // Nothing in flight on the sampling side.
  assign sample_quiet = trans_idle && c_empty && e_empty && (outstanding == '0);

  assign clr       = (phase == P_CLEAR);
  assign seed      = (phase == P_SEED);
  assign refine_en = (phase == P_ITER);
  assign busy      = (phase != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase         <= P_IDLE;
      first         <= 1'b0;
      switch_sig    <= 1'b0;
      thr           <= '0;
      lvl           <= '0;
      sampling_done <= 1'b0;
      done          <= 1'b0;
      n_iter        <= '0;
      outstanding   <= '0;
    end else begin
      done <= 1'b0;
      case ({req_pop, resp_valid})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: outstanding <= outstanding;
      endcase
      case (phase)
        P_IDLE: if (start) begin
          sampling_done <= 1'b0;
          phase         <= P_CLEAR;
        end
        P_CLEAR: begin
          switch_sig    <= 1'b0;
          n_iter        <= '0;
          first         <= 1'b1;
          phase         <= P_SEED;
        end
        P_SEED:      phase <= P_SEED_WAIT;
        P_SEED_WAIT: if (sample_quiet) phase <= P_SWITCH;
        P_SWITCH: begin
          switch_sig <= ~switch_sig;
          lvl        <= first ? lvl_t'(INIT_LVL) : lvl - 1'b1;
          first      <= 1'b0;
          thr        <= thr_in;
          phase      <= P_CHECK;
        end
        P_CHECK: begin
          if (a_empty) begin
            sampling_done <= 1'b1;
            phase         <= P_INTERP;
          end else begin
            n_iter <= n_iter + 1'b1;
            phase  <= P_ITER;
          end
        end
        P_ITER: if (a_empty && refine_idle && sample_quiet) phase <= P_SWITCH;
        P_INTERP: if (d_empty && interp_idle) begin
          done  <= 1'b1;
          phase <= P_IDLE;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  a_resp_matches_req: assert property (@(posedge clk) disable iff (!rst_n)
                                       resp_valid |-> (outstanding != '0 || req_pop))
    else $error("state_machine: pixel returned that was never requested");

endmodule
