// tb_ipa_config: the end-to-end test of tb_ipa_top run on a second
// configuration of the block: seed grid at level 3 (a 3 x 3 grid of reads and
// four level-3 blocks, as in the paper's sampling illustration) and three
// interpolation units, which exercises the enable chain beyond two units,
// with linear storage of a 20 macro block wide image.
// Same generated images, memory model, reference model and checks; the third
// unit must be used at least once as well.
module tb_ipa_config;
  import ipa_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // DUT signals
  logic   start = 1'b0;
  score_t thr = '0;
  logic   busy, sampling_done, done;
  logic   req_valid, req_ready;
  pos_t   req_pos;
  logic [15:0] req_page, req_col;
  logic [7:0]  mb_x = '0, mb_y = '0;
  logic [7:0]  mb_xs = '0, mb_ys = '0;   // coordinates given at start
  int     addr_errs = 0;
  logic   resp_valid;
  pos_t   resp_pos;
  pix_t   resp_data;
  pos_t   cl_pos;
  pix_t   cl_data;
  logic   cl_sampled;
  logic [$clog2(NPIX+1)-1:0] n_sampled;
  logic [3:0] n_iter;
  lvl_t   lvl;

  localparam int TB_INIT = 3;   // seed level of the block under test
  localparam int TB_MAP  = 0;         // storage layout: 0 linear, 1 block
  localparam int TB_MBPR = 20;        // macro blocks per image row

  ipa_top #(.INIT_LVL(3), .NUM_INTERP(3), .MAPPING(0), .MB_PER_ROW(20)) dut (.*);

  // ---------------- image under test ----------------
  int img [MB_SIZE][MB_SIZE];

  task automatic make_image(int kind);
    for (int y = 0; y < MB_SIZE; y++)
      for (int x = 0; x < MB_SIZE; x++) begin
        int v;
        case (kind)
          0: v = (((x - 18) * (x - 18) + (y - 18) * (y - 18)) < 200) ? 190 + x : 30 + 2 * y;
          1: v = int'($urandom_range(255));
          2: v = 8 * x + 4 * y;
          3: v = 77;
          default: v = ((x < 8) == (y < 8)) ? int'($urandom_range(255)) : 100 + x + y;
        endcase
        img[y][x] = (v > 255) ? 255 : v;
      end
  endtask

  // ---------------- memory model ----------------
  typedef struct { pos_t p; int due; } pend_t;
  pend_t pend [$];
  int    cyc = 0;
  int    n_reads = 0;
  int    n_ooo = 0;
  bit    read_seen [MB_SIZE][MB_SIZE];
  int    n_dup_reads = 0;

  always_ff @(posedge clk) cyc <= cyc + 1;

  // slow = 1 models a busy memory that accepts one request in eight cycles
  bit slow = 1'b0;
  initial req_ready = 1'b0;
  always @(negedge clk) req_ready = slow ? ($urandom_range(7) == 0) : ($urandom_range(3) != 0);

  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready) begin
      pend_t e;
      e.p   = req_pos;
      e.due = cyc + int'($urandom_range(1, 8));
      pend.push_back(e);
      n_reads++;
      if (read_seen[req_pos.y][req_pos.x]) n_dup_reads++;
      read_seen[req_pos.y][req_pos.x] = 1'b1;
      // DRAM address of the request, for the macro block set at start
      if (TB_MAP == 0) begin
        if (int'(req_page) != int'(mb_ys) * MB_SIZE + int'(req_pos.y) ||
            int'(req_col)  != int'(mb_xs) * MB_SIZE + int'(req_pos.x)) addr_errs++;
      end else begin
        if (int'(req_page) != int'(mb_ys) * TB_MBPR + int'(mb_xs) ||
            int'(req_col)  != int'(req_pos.y) * MB_SIZE + int'(req_pos.x)) addr_errs++;
      end
    end
  end

  // Return one due pixel per cycle, a random one among those due.
  always @(negedge clk) begin
    int due_idx [$];
    resp_valid = 1'b0;
    resp_pos   = '0;
    resp_data  = '0;
    due_idx.delete();
    foreach (pend[i]) if (pend[i].due <= cyc) due_idx.push_back(i);
    if (due_idx.size() > 0) begin
      int pick;
      pick = due_idx[$urandom_range(due_idx.size() - 1)];
      if (pick != 0) n_ooo++;
      resp_valid = 1'b1;
      resp_pos   = pend[pick].p;
      resp_data  = pix_t'(img[pend[pick].p.y][pend[pick].p.x]);
      pend.delete(pick);
    end
  end

  // ---------------- reference model ----------------
  typedef struct { int x; int y; int l; } rblk_t;
  int ref_val [MB_SIZE][MB_SIZE];
  int ref_tag [MB_SIZE][MB_SIZE];
  bit ref_s   [MB_SIZE][MB_SIZE];
  int ref_reads;
  int ref_iters;

  task automatic ref_sample(int x, int y);
    if (!ref_s[y][x]) ref_reads++;
    ref_s[y][x] = 1'b1;
  endtask

  // t: threshold of the first level; each further level adds t_raise
  task automatic ref_run(int t, int t_raise, int init_lvl);
    rblk_t cur [$];
    rblk_t nxt [$];
    rblk_t dq [$];
    int st = 1 << init_lvl;
    ref_reads = 0;
    ref_iters = 0;
    foreach (ref_s[y, x]) ref_s[y][x] = 1'b0;
    for (int y = 0; y < MB_SIZE; y += st)
      for (int x = 0; x < MB_SIZE; x += st) begin
        ref_sample(x, y);
        if (x < MB_SIZE - 1 && y < MB_SIZE - 1) cur.push_back('{x, y, init_lvl});
      end
    while (cur.size() > 0) begin
      ref_iters++;
      foreach (cur[n]) begin
        rblk_t b = cur[n];
        int s = 1 << b.l;
        int h = s / 2;
        int v [4];
        int mx, mn, score;
        v[0] = img[b.y][b.x];     v[1] = img[b.y][b.x + s];
        v[2] = img[b.y + s][b.x]; v[3] = img[b.y + s][b.x + s];
        mx = v[0]; mn = v[0];
        for (int k = 1; k < 4; k++) begin
          if (v[k] > mx) mx = v[k];
          if (v[k] < mn) mn = v[k];
        end
        score = s * s * (mx - mn);
        if (score > t + t_raise * (init_lvl - b.l)) begin
          ref_sample(b.x + h, b.y);     ref_sample(b.x, b.y + h);
          ref_sample(b.x + h, b.y + h); ref_sample(b.x + s, b.y + h);
          ref_sample(b.x + h, b.y + s);
          if (b.l > 1) begin
            nxt.push_back('{b.x, b.y, b.l - 1});     nxt.push_back('{b.x + h, b.y, b.l - 1});
            nxt.push_back('{b.x, b.y + h, b.l - 1}); nxt.push_back('{b.x + h, b.y + h, b.l - 1});
          end
        end else begin
          dq.push_back(b);
        end
      end
      cur = nxt;
      nxt.delete();
    end
    // reconstruction
    foreach (ref_tag[y, x]) begin
      ref_tag[y][x] = ref_s[y][x] ? 0 : 99;
      ref_val[y][x] = img[y][x];
    end
    foreach (dq[n]) begin
      rblk_t b = dq[n];
      int s = 1 << b.l;
      for (int j = 0; j <= s; j++)
        for (int i = 0; i <= s; i++) begin
          int x = b.x + i;
          int y = b.y + j;
          if (ref_tag[y][x] != 0 && b.l <= ref_tag[y][x]) begin
            int num;
            num = (s - i) * (s - j) * img[b.y][b.x] + i * (s - j) * img[b.y][b.x + s] +
                  (s - i) * j * img[b.y + s][b.x] + i * j * img[b.y + s][b.x + s];
            ref_val[y][x] = (num + s * s / 2) / (s * s);
            ref_tag[y][x] = b.l;
          end
        end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int m_refine = 0, m_interp = 0, m_switch = 0, m_dupskip = 0, m_efull = 0, m_unit2 = 0, m_unit3 = 0, m_raise = 0;
  score_t thr_q_prev = '0;
  logic sw_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (dut.c_wr) m_refine++;
    if (dut.d_wr) m_interp++;
    if (dut.switch_sig != sw_q) m_switch++;
    sw_q = dut.switch_sig;
    if (dut.u_trans.step_ok && dut.u_trans.skip_pix) m_dupskip++;
    if (dut.e_full) m_efull++;
    if (dut.d_rd[1]) m_unit2++;
    if (dut.d_rd[2]) m_unit3++;
    if (n_iter != 0 && dut.thr_q != thr_q_prev) m_raise++;
    thr_q_prev = dut.thr_q;
  end

  // ---------------- one acquisition ----------------
  // Threshold schedule: while raise is non-zero, thr is moved ahead to the
  // value of the next level as soon as a level has started (the block captures
  // thr when a level begins).
  int raise = 0;
  int base_thr = 0;
  always @(negedge clk)
    if (busy && raise != 0 && n_iter != 0)
      thr = score_t'(base_thr + raise * (TB_INIT - (int'(lvl) - 1)));

  task automatic acquire(int kind, int t, int t_raise = 0);
    int t0, errs, budget;
    make_image(kind);
    foreach (read_seen[y, x]) read_seen[y][x] = 1'b0;
    n_reads = 0;
    n_dup_reads = 0;
    ref_run(t, t_raise, TB_INIT);
    raise    = 0;
    base_thr = t;
    @(negedge clk);
    thr   = score_t'(t);
    mb_x  = 8'($urandom_range(TB_MBPR - 1));
    mb_y  = 8'($urandom_range(TB_MBPR - 1));
    mb_xs = mb_x;
    mb_ys = mb_y;
    start = 1'b1;
    t0    = cyc;
    @(negedge clk);
    start = 1'b0;
    // the macro block coordinates are captured at start; move the inputs
    // away to show that the requests keep the captured ones
    mb_x  = ~mb_x;
    mb_y  = ~mb_y;
    // the level counters are cleared one cycle after start; the schedule
    // follows them from then on
    @(negedge clk);
    raise = t_raise;
    while (!done) @(negedge clk);
    // budget: memory traffic plus one cycle per interpolated pixel, generous
    budget = (slow ? 80 : 40) * ref_reads + NPIX * 3 + 200;
    checks++;
    if (cyc - t0 > budget) begin
      failures++;
      $display("FAIL kind %0d thr %0d: %0d cycles > budget %0d", kind, t, cyc - t0, budget);
    end
    checks++;
    if (n_reads != ref_reads || n_dup_reads != 0 || int'(n_sampled) != ref_reads) begin
      failures++;
      $display("FAIL kind %0d thr %0d: reads %0d dup %0d sampled %0d expected %0d",
               kind, t, n_reads, n_dup_reads, n_sampled, ref_reads);
    end
    checks++;
    if (int'(n_iter) != ref_iters) begin
      failures++;
      $display("FAIL kind %0d thr %0d: %0d iterations, expected %0d", kind, t, n_iter, ref_iters);
    end
    errs = 0;
    for (int y = 0; y < MB_SIZE; y++)
      for (int x = 0; x < MB_SIZE; x++) begin
        cl_pos = mk_pos(x, y);
        #1;
        checks++;
        if (int'(cl_data) != ref_val[y][x] || cl_sampled != ref_s[y][x]) begin
          failures++;
          if (errs++ < 5)
            $display("FAIL kind %0d thr %0d: pixel (%0d,%0d) = %0d/%0b expected %0d/%0b",
                     kind, t, x, y, cl_data, cl_sampled, ref_val[y][x], ref_s[y][x]);
        end
      end
    checks++;
    if (addr_errs != 0) begin
      failures++;
      $display("FAIL kind %0d thr %0d: %0d requests with a wrong DRAM page/column", kind, t, addr_errs);
    end
    addr_errs = 0;
    $display("kind %0d thr %0d: %0d reads of %0d pixels, %0d iterations, %0d cycles",
             kind, t, n_reads, NPIX, n_iter, cyc - t0);
  endtask

  initial begin
    int thrs [5] = '{150, 600, 1800, 0, 300};
    cl_pos     = '0;
    resp_valid = 1'b0;
    resp_pos   = '0;
    resp_data  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int kind = 0; kind < 5; kind++)
      foreach (thrs[n]) acquire(kind, thrs[n]);
    for (int n = 0; n < 10; n++) acquire(int'($urandom_range(4)), int'($urandom_range(2500)));
    slow = 1'b1;
    for (int kind = 0; kind < 5; kind++) acquire(kind, 150);
    slow = 1'b0;
    // threshold raised at every level, as a bandwidth controller might
    for (int kind = 0; kind < 5; kind++) begin
      acquire(kind, 100, 150);
      acquire(kind, 300, 400);
    end
    raise = 0;
    $display("mechanisms: refine %0d interp %0d switch %0d dup-skip %0d fifo_e-full %0d unit2 %0d out-of-order %0d thr-raise %0d",
             m_refine, m_interp, m_switch, m_dupskip, m_efull, m_unit2, n_ooo, m_raise);
    checks++; if (m_refine  == 0) begin failures++; $display("FAIL: no block refined"); end
    checks++; if (m_interp  == 0) begin failures++; $display("FAIL: no block interpolated"); end
    checks++; if (m_switch  == 0) begin failures++; $display("FAIL: no FIFO_A/FIFO_B swap"); end
    checks++; if (m_dupskip == 0) begin failures++; $display("FAIL: no duplicate read suppressed"); end
    checks++; if (m_efull   == 0) begin failures++; $display("FAIL: FIFO_E never full"); end
    checks++; if (m_unit2   == 0) begin failures++; $display("FAIL: second interp unit never used"); end
    checks++; if (m_raise   == 0) begin failures++; $display("FAIL: threshold never raised between levels"); end
    checks++; if (m_unit3   == 0) begin failures++; $display("FAIL: third interp unit never used"); end
    checks++; if (n_ooo     == 0) begin failures++; $display("FAIL: no out-of-order return"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
