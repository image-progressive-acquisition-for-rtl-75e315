// tb_addr_translator: seeds the initial grid, then feeds random blocks
// through a modelled FIFO_C and checks the pixel stream (FIFO_E) and the child
// block stream (FIFO_B) against a model: per block the five split pixels in
// the order top, left, centre, right, bottom, each pixel requested at most once
// since the last clear, and the four children (upper-left, upper-right,
// lower-left, lower-right) unless they would have side 1. Random back-pressure
// on both queues; without it a block must take six cycles (take + five steps).
module tb_addr_translator;
  import ipa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr = 1'b0, seed = 1'b0;
  block_t c_dout;
  logic c_empty, c_rd_en;
  logic e_wr_en, b_wr_en, idle;
  logic e_full = 1'b0, b_full = 1'b0;
  pos_t e_din;
  block_t b_din;

  addr_translator dut (.*);

  block_t cq [$];
  pos_t   exp_e [$];
  block_t exp_b [$];
  bit     req [MB_SIZE][MB_SIZE];
  bit     stress = 1'b1;
  int     n_skip = 0;

  initial begin c_empty = 1'b1; c_dout = '0; end

  always @(negedge clk) if (stress) begin
    e_full = ($urandom_range(3) == 0);
    b_full = ($urandom_range(3) == 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (e_wr_en) begin
      checks++;
      if (e_full || exp_e.size() == 0 || e_din != exp_e[0]) begin
        failures++;
        if (failures < 6) $display("FAIL pixel (%0d,%0d) full %b", e_din.x, e_din.y, e_full);
      end
      if (exp_e.size() > 0) void'(exp_e.pop_front());
    end
    if (b_wr_en) begin
      checks++;
      if (b_full || exp_b.size() == 0 || b_din != exp_b[0]) begin
        failures++;
        if (failures < 6) $display("FAIL child %h full %b", b_din, b_full);
      end
      if (exp_b.size() > 0) void'(exp_b.pop_front());
    end
    if (c_rd_en) void'(cq.pop_front());
    c_empty <= (cq.size() == 0);
    c_dout  <= (cq.size() == 0) ? block_t'('0) : cq[0];
  end

  task automatic want_pix(int x, int y);
    if (!req[y][x]) exp_e.push_back(mk_pos(x, y));
    else n_skip++;
    req[y][x] = 1'b1;
  endtask

  task automatic push_block(block_t b);
    int s = 1 << b.lvl;
    int h = s / 2;
    int l = int'(b.lvl) - 1;
    cq.push_back(b);
    want_pix(b.x + h, b.y);     want_pix(b.x, b.y + h); want_pix(b.x + h, b.y + h);
    want_pix(b.x + s, b.y + h); want_pix(b.x + h, b.y + s);
    if (b.lvl > 1) begin
      exp_b.push_back('{b.x, b.y, lvl_t'(l)});
      exp_b.push_back('{coord_t'(b.x + h), b.y, lvl_t'(l)});
      exp_b.push_back('{b.x, coord_t'(b.y + h), lvl_t'(l)});
      exp_b.push_back('{coord_t'(b.x + h), coord_t'(b.y + h), lvl_t'(l)});
    end
  endtask

  task automatic wait_drained();
    while (exp_e.size() > 0 || exp_b.size() > 0 || cq.size() > 0 || !idle) @(negedge clk);
  endtask

  task automatic clear_and_seed();
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    foreach (req[y, x]) req[y][x] = 1'b0;
    seed = 1'b1;
    for (int y = 0; y < MB_SIZE; y += 16)
      for (int x = 0; x < MB_SIZE; x += 16) want_pix(x, y);
    exp_b.push_back('{coord_t'(0), coord_t'(0), lvl_t'(MAX_LVL)});
    @(negedge clk);
    seed = 1'b0;
    wait_drained();
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      clear_and_seed();
      for (int n = 0; n < 30; n++) begin
        block_t b;
        int s;
        b.lvl = lvl_t'($urandom_range(1, MAX_LVL));
        s = 1 << b.lvl;
        b.x = coord_t'(s * $urandom_range(0, 16 / s - 1));
        b.y = coord_t'(s * $urandom_range(0, 16 / s - 1));
        push_block(b);
      end
      c_empty = 1'b0;
      c_dout  = cq[0];
      wait_drained();
    end
    // throughput: 16 level-2 blocks of a fresh macro block, no back-pressure
    stress = 1'b0;
    e_full = 1'b0;
    b_full = 1'b0;
    clear_and_seed();
    for (int n = 0; n < 16; n++) push_block('{coord_t'(4 * (n % 4)), coord_t'(4 * (n / 4)), lvl_t'(2)});
    c_empty = 1'b0;
    c_dout  = cq[0];
    t0 = $time;
    wait_drained();
    checks++;
    if (($time - t0) / 10 > 6 * 16 + 2) begin
      failures++;
      $display("FAIL: 16 blocks took %0d cycles", ($time - t0) / 10);
    end
    checks++;
    if (n_skip == 0) begin failures++; $display("FAIL: no duplicate suppressed"); end
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
