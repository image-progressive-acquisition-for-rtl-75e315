// tb_interp_unit: two interpolation units chained as in the design (the
// second is enabled only while the first is busy) drain a modelled FIFO_D.
// Corner values come from a random canvas. For each block a unit takes, the
// test checks every written position and value against
// round(((s-i)(s-j)p00 + i(s-j)p10 + (s-i)j p01 + ij p11) / s^2), the level
// carried with the write, the row-by-row order, (s+1)^2 writes per block and
// (s+1)^2 + 1 busy cycles; that the two units never pop together; and that
// both were used.
module tb_interp_unit;
  import ipa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  block_t d_dout;
  logic   d_empty;
  logic [1:0] d_rd_en, en, busy, w_en;
  pos_t [1:0] w_pos;
  lvl_t [1:0] w_lvl;
  pix_t [1:0] w_data;
  pos_t [1:0][3:0] c_pos;
  pix_t [1:0][3:0] c_data;

  assign en[0] = 1'b1;
  assign en[1] = busy[0];

  for (genvar g = 0; g < 2; g++) begin : g_u
    interp_unit dut (
      .clk, .rst_n, .en(en[g]), .d_dout, .d_empty, .d_rd_en(d_rd_en[g]),
      .c_pos(c_pos[g]), .c_data(c_data[g]),
      .w_en(w_en[g]), .w_pos(w_pos[g]), .w_lvl(w_lvl[g]), .w_data(w_data[g]),
      .busy(busy[g])
    );
  end

  int cimg [MB_SIZE][MB_SIZE];
  always_comb
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < 4; k++) c_data[g][k] = pix_t'(cimg[c_pos[g][k].y][c_pos[g][k].x]);

  typedef struct { pos_t p; int v; int l; } wr_t;
  block_t dq [$];
  wr_t    exp_w [2][$];
  int     busy_cnt [2];
  int     exp_busy [2];
  int     n_used [2];
  int     n_blocks = 0;

  initial begin d_empty = 1'b1; d_dout = '0; end

  task automatic expect_block(int g, block_t b);
    int s = 1 << b.lvl;
    for (int j = 0; j <= s; j++)
      for (int i = 0; i <= s; i++) begin
        wr_t w;
        int num;
        num = (s - i) * (s - j) * cimg[b.y][b.x] + i * (s - j) * cimg[b.y][b.x + s] +
              (s - i) * j * cimg[b.y + s][b.x] + i * j * cimg[b.y + s][b.x + s];
        w.p = mk_pos(b.x + i, b.y + j);
        w.v = (num + s * s / 2) / (s * s);
        w.l = b.lvl;
        exp_w[g].push_back(w);
      end
    exp_busy[g] = (s + 1) * (s + 1) + 1;
    busy_cnt[g] = 0;
    n_used[g]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (d_rd_en == 2'b11) begin failures++; $display("FAIL: both units popped"); end
    for (int g = 0; g < 2; g++) begin
      if (d_rd_en[g]) expect_block(g, d_dout);
      if (busy[g]) begin
        busy_cnt[g]++;
      end
      if (w_en[g]) begin
        checks++;
        if (exp_w[g].size() == 0 || w_pos[g] != exp_w[g][0].p ||
            int'(w_data[g]) != exp_w[g][0].v || int'(w_lvl[g]) != exp_w[g][0].l) begin
          failures++;
          if (failures < 6) $display("FAIL unit %0d write (%0d,%0d)=%0d", g, w_pos[g].x,
                                     w_pos[g].y, w_data[g]);
        end
        if (exp_w[g].size() > 0) void'(exp_w[g].pop_front());
        if (exp_w[g].size() == 0) begin
          checks++;
          if (busy_cnt[g] != exp_busy[g]) begin
            failures++;
            $display("FAIL unit %0d busy %0d cycles, expected %0d", g, busy_cnt[g], exp_busy[g]);
          end
          n_blocks++;
        end
      end
    end
    if (|d_rd_en) void'(dq.pop_front());
    d_empty <= (dq.size() == 0);
    d_dout  <= (dq.size() == 0) ? block_t'('0) : dq[0];
  end

  initial begin
    int total = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 30; r++) begin
      foreach (cimg[y, x]) cimg[y][x] = $urandom_range(255);
      for (int n = 0; n < 8; n++) begin
        block_t b;
        int s;
        b.lvl = lvl_t'($urandom_range(1, MAX_LVL));
        s = 1 << b.lvl;
        b.x = coord_t'(s * $urandom_range(0, 16 / s - 1));
        b.y = coord_t'(s * $urandom_range(0, 16 / s - 1));
        dq.push_back(b);
        total++;
      end
      d_empty = 1'b0;
      d_dout  = dq[0];
      while (dq.size() > 0 || busy != 0) @(negedge clk);
      @(negedge clk);
    end
    checks++;
    if (n_blocks != total || n_used[0] == 0 || n_used[1] == 0) begin
      failures++;
      $display("FAIL: %0d of %0d blocks finished, unit use %0d/%0d", n_blocks, total,
               n_used[0], n_used[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
