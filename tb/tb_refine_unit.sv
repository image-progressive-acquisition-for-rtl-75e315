// tb_refine_unit: feeds random blocks through a modelled FIFO_A, serves the
// vertex reads from a random canvas and checks that every block leaves, in
// order, through FIFO_C when 4**lvl * (max - min) of its vertices exceeds the
// threshold and through FIFO_D otherwise. Random back-pressure on both output
// queues and random en gaps are applied; with neither, the unit must handle
// one block every two cycles.
module tb_refine_unit;
  import ipa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en = 1'b0;
  score_t thr = '0;
  block_t a_dout;
  logic a_empty, a_rd_en;
  pos_t [3:0] v_pos;
  pix_t [3:0] v_data;
  logic c_wr_en, d_wr_en, idle;
  logic c_full = 1'b0, d_full = 1'b0;
  block_t c_din, d_din;
  score_t score;

  refine_unit dut (.*);

  int cimg [MB_SIZE][MB_SIZE];
  block_t aq [$];
  block_t exp_q [$];
  bit     exp_c [$];
  bit     stress = 1'b1;
  int     n_c = 0, n_d = 0, n_pop_dis = 0;

  // show-ahead view of the modelled FIFO_A
  initial begin a_empty = 1'b1; a_dout = '0; end

  always_comb
    for (int k = 0; k < 4; k++) v_data[k] = pix_t'(cimg[v_pos[k].y][v_pos[k].x]);

  function automatic block_t rnd_block();
    block_t b;
    int s;
    b.lvl = lvl_t'($urandom_range(1, MAX_LVL));
    s = 1 << b.lvl;
    b.x = coord_t'(s * $urandom_range(0, 16 / s - 1));
    b.y = coord_t'(s * $urandom_range(0, 16 / s - 1));
    return b;
  endfunction

  function automatic bit ref_refine(block_t b, int t);
    int s = 1 << b.lvl;
    int v [4];
    int mx, mn;
    v[0] = cimg[b.y][b.x];     v[1] = cimg[b.y][b.x + s];
    v[2] = cimg[b.y + s][b.x]; v[3] = cimg[b.y + s][b.x + s];
    mx = v[0]; mn = v[0];
    for (int k = 1; k < 4; k++) begin
      if (v[k] > mx) mx = v[k];
      if (v[k] < mn) mn = v[k];
    end
    return (s * s * (mx - mn)) > t;
  endfunction

  always @(negedge clk) if (stress) begin
    en     = ($urandom_range(7) != 0);
    c_full = ($urandom_range(3) == 0);
    d_full = ($urandom_range(3) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (a_rd_en && !en) n_pop_dis++;
    if (c_wr_en || d_wr_en) begin
      block_t got;
      got = c_wr_en ? c_din : d_din;
      checks++;
      if (exp_q.size() == 0 || (c_wr_en && d_wr_en) || got != exp_q[0] ||
          c_wr_en != exp_c[0]) begin
        failures++;
        if (failures < 6) $display("FAIL block %h to %s", got, c_wr_en ? "C" : "D");
      end
      if (exp_q.size() > 0) begin void'(exp_q.pop_front()); void'(exp_c.pop_front()); end
      if (c_wr_en) n_c++; else n_d++;
      if ((c_wr_en && c_full) || (d_wr_en && d_full)) begin
        failures++;
        $display("FAIL push into full queue");
      end
    end
    if (a_rd_en) void'(aq.pop_front());
    a_empty <= (aq.size() == 0);
    a_dout  <= (aq.size() == 0) ? block_t'('0) : aq[0];
  end

  task automatic run_batch(int n, int t);
    foreach (cimg[y, x]) cimg[y][x] = ($urandom_range(3) == 0) ? $urandom_range(255) : 100 + $urandom_range(6);
    thr = score_t'(t);
    for (int k = 0; k < n; k++) begin
      block_t b = rnd_block();
      aq.push_back(b);
      exp_q.push_back(b);
      exp_c.push_back(ref_refine(b, t));
    end
    a_empty = 1'b0;
    a_dout  = aq[0];
    while (exp_q.size() > 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 40; b++) run_batch(50, int'($urandom_range(3000)));
    // throughput: no back-pressure, en held high
    stress = 1'b0;
    @(negedge clk);
    en = 1'b1; c_full = 1'b0; d_full = 1'b0;
    t0 = $time;
    run_batch(64, 600);
    checks++;
    // 64 blocks at two cycles each, plus the two idle cycles of run_batch
    if (($time - t0) / 10 > 2 * 64 + 3) begin
      failures++;
      $display("FAIL: 64 blocks took %0d cycles", ($time - t0) / 10);
    end
    checks++;
    if (n_c == 0 || n_d == 0 || n_pop_dis != 0) begin
      failures++;
      $display("FAIL: C %0d D %0d pops while disabled %0d", n_c, n_d, n_pop_dis);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
