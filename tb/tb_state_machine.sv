// tb_state_machine: drives the datapath status inputs by script through one
// acquisition of three iterations and checks the sequence: a single-cycle
// clear, then a single-cycle seed; no swap while the seed reads are in flight;
// a swap of FIFO_A/FIFO_B and one level down after each iteration, and only
// once every unit is idle, the pixel queue is empty and every read has
// returned; refine enabled only inside iterations; the threshold captured at
// each iteration start; sampling_done when an iteration starts with an empty
// block list; done, as a single pulse, only after FIFO_D has drained and the
// interpolation units are idle. The outstanding-read counter is checked
// against the script throughout.
module tb_state_machine;
  import ipa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 1'b0;
  score_t thr_in = '0;
  logic a_empty = 1'b1, refine_idle = 1'b1, c_empty = 1'b1, trans_idle = 1'b1;
  logic e_empty = 1'b1, d_empty = 1'b1, interp_idle = 1'b1;
  logic req_pop = 1'b0, resp_valid = 1'b0;
  logic clr, seed, refine_en, switch_sig, busy, sampling_done, done;
  score_t thr;
  lvl_t lvl;
  logic [3:0] n_iter;
  logic [15:0] outstanding;

  state_machine dut (.*);

  bit next_empty = 1'b1;          // whether the modelled FIFO_B is empty
  int n_clr = 0, n_seed = 0, n_done = 0, n_sw = 0, n_ren = 0;
  int model_out = 0;
  logic sw_q = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (clr) n_clr++;
    if (seed) n_seed++;
    if (done) n_done++;
    if (refine_en) n_ren++;
    if (switch_sig != sw_q) begin
      n_sw++;
      a_empty = next_empty;       // the queues swap: FIFO_B becomes FIFO_A
    end
    sw_q = switch_sig;
    model_out += int'(req_pop) - int'(resp_valid);
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  // some memory traffic: n requests, answered after a delay
  task automatic traffic(int n);
    for (int k = 0; k < n; k++) begin
      req_pop = 1'b1;
      cycles(1);
    end
    req_pop = 1'b0;
    e_empty = 1'b1;
    cycles(3);
    check(int'(outstanding) == n && model_out == n, "outstanding count after requests");
    check(n_sw == sw_base, "no swap while reads are in flight");
    for (int k = 0; k < n; k++) begin
      resp_valid = 1'b1;
      cycles(1);
    end
    resp_valid = 1'b0;
  endtask

  int sw_base;

  initial begin
    int sw0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cycles(2);
    check(!busy && !clr && !seed, "idle after reset");
    thr_in = 16'd600;
    start  = 1'b1;
    cycles(1);
    start  = 1'b0;
    // seed phase: translator busy, then pixel traffic
    trans_idle = 1'b0;
    e_empty    = 1'b0;
    sw_base    = n_sw;
    cycles(3);
    check(n_clr == 1 && n_seed == 1, "one clear and one seed pulse");
    cycles(4);
    trans_idle = 1'b1;
    next_empty = 1'b0;            // the seed produced one block
    traffic(4);
    cycles(3);
    check(n_sw == sw_base + 1, "swap after seeding");
    check(lvl == lvl_t'(MAX_LVL), "first iteration at the initial level");
    check(thr == 16'd600, "threshold captured");
    check(refine_en && n_iter == 1, "iteration 1 running");
    // three iterations
    for (int it = 0; it < 3; it++) begin
      sw_base = n_sw;
      thr_in  = 16'(900 + 100 * it);
      refine_idle = 1'b0;
      cycles(5);
      check(n_sw == sw_base, "no swap while blocks remain");
      a_empty = 1'b1;
      cycles(2);
      check(n_sw == sw_base, "no swap while the refine unit is busy");
      refine_idle = 1'b1;
      c_empty = 1'b0;
      cycles(2);
      check(n_sw == sw_base, "no swap while FIFO_C holds blocks");
      c_empty = 1'b0;
      trans_idle = 1'b0;
      c_empty = 1'b1;
      e_empty = 1'b0;
      cycles(2);
      trans_idle = 1'b1;
      next_empty = (it == 2);     // the last iteration produced no children
      d_empty = 1'b0;             // some blocks wait for interpolation
      traffic(3);
      cycles(3);
      check(n_sw == sw_base + 1, "one swap per iteration");
      check(int'(lvl) == MAX_LVL - 1 - it, "level halves each iteration");
      check(thr == 16'(900 + 100 * it), "threshold recaptured per iteration");
      if (it < 2) check(refine_en && int'(n_iter) == it + 2, "next iteration running");
    end
    check(sampling_done && !refine_en, "sampling done");
    interp_idle = 1'b0;
    cycles(5);
    check(n_done == 0 && busy, "no done while FIFO_D holds blocks");
    d_empty = 1'b1;
    cycles(3);
    check(n_done == 0, "no done while an interpolation unit is busy");
    interp_idle = 1'b1;
    cycles(3);
    check(n_done == 1 && !busy, "one done pulse and back to idle");
    check(n_ren > 0 && outstanding == 0, "refine enabled, no reads left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
