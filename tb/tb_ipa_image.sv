// tb_ipa_image: acquires a whole 527 x 527 image, macro block by macro block,
// at eight thresholds from 1800 down to 150 (the range the design is meant
// for) and reports what the acquisition costs and delivers.
//
// The image is synthetic, computed here: smooth gradients, two discs with
// sharp edges and a band of fine texture, 8 bits per pixel. The 31 x 31 macro
// blocks of 17 x 17 pixels are acquired one after the other by one block with
// default parameters. The image is held block mapped, one macro block per
// DRAM page, and the memory model fetches each pixel by the page and column
// the block puts on the request, so a wrong address shows up as a wrong
// pixel. It accepts one request per cycle and returns each pixel 4 cycles
// later, like a streaming memory at the design's clock.
//
// Per threshold the test reports the fraction of pixels read, the PSNR of the
// reconstruction, the cycles until sampling ended (memory busy) and until the
// canvas was complete, summed over all macro blocks, next to the 527 * 527
// cycles a full read at one pixel per cycle takes. It also counts DRAM page
// switches in the request stream, for the block layout the design drives
// and for a linear layout (one image row per page) worked out here from the
// same requests, next to a full row-by-row read of every macro block (1 and
// 17 pages per macro block). It checks every reconstructed pixel against a
// reference model of the adaptive refinement, that a lower threshold never
// reads fewer pixels, that 1800, 600 and 150 give rising PSNR, that memory
// is always busy for fewer cycles than a full read, that pixels read are
// exact, and that block mapping opens exactly one page per macro block.
module tb_ipa_image;
  import ipa_pkg::*;

  localparam int IMG = 527;
  localparam int NMB = IMG / MB_SIZE;   // 31

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic   start = 1'b0;
  score_t thr = '0;
  logic   busy, sampling_done, done;
  logic   req_valid;
  logic   req_ready = 1'b1;
  pos_t   req_pos;
  logic [15:0] req_page, req_col;
  logic [7:0]  mb_x = '0, mb_y = '0;
  logic   resp_valid;
  pos_t   resp_pos;
  pix_t   resp_data;
  pos_t   cl_pos = '0;
  pix_t   cl_data;
  logic   cl_sampled;
  logic [$clog2(NPIX+1)-1:0] n_sampled;
  logic [3:0] n_iter;
  lvl_t   lvl;

  ipa_top dut (.*);

  // ---------------- synthetic image ----------------
  function automatic int image_at(int x, int y);
    int v;
    int h;
    v = (x * 160) / IMG + (y * 60) / IMG + 20;
    if ((x - 180) * (x - 180) + (y - 200) * (y - 200) < 110 * 110) v = 200 - (y - 90) / 4;
    if ((x - 390) * (x - 390) + (y - 370) * (y - 370) < 70 * 70) v = 60;
    if (y > 430 && y < 500) begin
      h = ((x * 73856093) ^ (y * 19349663)) & 32'h7fff_ffff;
      v = v + (h % 48) - 24 + ((x / 3) % 2) * 30;
    end
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

  // ---------------- memory model: fixed latency, in order ----------------
  localparam int LAT = 4;
  pos_t pipe_p [LAT];
  int   pipe_a [LAT];      // page * 65536 + column

  // page switches of the request stream, block layout and linear layout
  int   last_bpage = -1, last_lpage = -1;
  int   n_bswitch = 0, n_lswitch = 0;
  always @(posedge clk) begin
    if (rst_n && req_valid && req_ready) begin
      int lp;
      lp = int'(mb_y) * MB_SIZE + int'(req_pos.y);
      if (int'(req_page) != last_bpage) n_bswitch++;
      if (lp != last_lpage) n_lswitch++;
      last_bpage = int'(req_page);
      last_lpage = lp;
    end
  end
  bit   pipe_v [LAT];

  initial for (int k = 0; k < LAT; k++) begin pipe_v[k] = 1'b0; pipe_p[k] = '0; pipe_a[k] = 0; end

  always @(posedge clk) begin
    for (int k = LAT - 1; k > 0; k--) begin
      pipe_v[k] <= pipe_v[k-1];
      pipe_p[k] <= pipe_p[k-1];
      pipe_a[k] <= pipe_a[k-1];
    end
    pipe_v[0] <= rst_n && req_valid && req_ready;
    pipe_p[0] <= req_pos;
    pipe_a[0] <= int'(req_page) * 65536 + int'(req_col);
  end

  assign resp_valid = pipe_v[LAT-1];
  assign resp_pos   = pipe_p[LAT-1];
  assign resp_data  = pix_t'(dram_at(pipe_a[LAT-1]));

  // Block-mapped storage: page = macro block number, column = offset in it.
  function automatic int dram_at(int a);
    int page, col;
    page = a / 65536;
    col  = a % 65536;
    if (page >= NMB * NMB || col >= NPIX) return 0;
    return image_at((page % NMB) * MB_SIZE + col % MB_SIZE,
                    (page / NMB) * MB_SIZE + col / MB_SIZE);
  endfunction

  // ---------------- reference model of one macro block ----------------
  typedef struct { int x; int y; int l; } rblk_t;
  int ref_val [MB_SIZE][MB_SIZE];
  bit ref_s   [MB_SIZE][MB_SIZE];
  int mb [MB_SIZE][MB_SIZE];

  task automatic ref_run(int t);
    rblk_t cur [$];
    rblk_t nxt [$];
    rblk_t dq [$];
    int tag [MB_SIZE][MB_SIZE];
    foreach (ref_s[y, x]) ref_s[y][x] = 1'b0;
    ref_s[0][0] = 1; ref_s[0][16] = 1; ref_s[16][0] = 1; ref_s[16][16] = 1;
    cur.push_back('{0, 0, MAX_LVL});
    while (cur.size() > 0) begin
      foreach (cur[n]) begin
        rblk_t b;
        int s, h, mx, mn;
        int v [4];
        b = cur[n];
        s = 1 << b.l;
        h = s / 2;
        v[0] = mb[b.y][b.x];     v[1] = mb[b.y][b.x + s];
        v[2] = mb[b.y + s][b.x]; v[3] = mb[b.y + s][b.x + s];
        mx = v[0]; mn = v[0];
        for (int k = 1; k < 4; k++) begin
          if (v[k] > mx) mx = v[k];
          if (v[k] < mn) mn = v[k];
        end
        if (s * s * (mx - mn) > t) begin
          ref_s[b.y][b.x + h] = 1;     ref_s[b.y + h][b.x] = 1; ref_s[b.y + h][b.x + h] = 1;
          ref_s[b.y + h][b.x + s] = 1; ref_s[b.y + s][b.x + h] = 1;
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
    foreach (tag[y, x]) begin
      tag[y][x] = ref_s[y][x] ? 0 : 99;
      ref_val[y][x] = mb[y][x];
    end
    foreach (dq[n]) begin
      rblk_t b;
      int s;
      b = dq[n];
      s = 1 << b.l;
      for (int j = 0; j <= s; j++)
        for (int i = 0; i <= s; i++)
          if (tag[b.y + j][b.x + i] != 0 && b.l <= tag[b.y + j][b.x + i]) begin
            int num;
            num = (s - i) * (s - j) * mb[b.y][b.x] + i * (s - j) * mb[b.y][b.x + s] +
                  (s - i) * j * mb[b.y + s][b.x] + i * j * mb[b.y + s][b.x + s];
            ref_val[b.y + j][b.x + i] = (num + s * s / 2) / (s * s);
            tag[b.y + j][b.x + i] = b.l;
          end
    end
  endtask

  // ---------------- whole image at one threshold ----------------
  int    cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  real   res_psnr  [8];
  int    res_reads [8];
  int    res_samp  [8];
  int    res_total [8];

  task automatic run_image(int ti, int t);
    real   sq = 0.0;
    int    reads = 0, samp = 0, total = 0, errs = 0;
    n_bswitch = 0; n_lswitch = 0; last_bpage = -1; last_lpage = -1;
    thr = score_t'(t);
    for (int my = 0; my < NMB; my++)
      for (int mx = 0; mx < NMB; mx++) begin
        int t0, ts;
        foreach (mb[y, x]) mb[y][x] = image_at(mx * MB_SIZE + x, my * MB_SIZE + y);
        ref_run(t);
        @(negedge clk);
        mb_x  = 8'(mx);
        mb_y  = 8'(my);
        start = 1'b1;
        t0 = cyc;
        ts = -1;
        @(negedge clk);
        start = 1'b0;
        while (!done) begin
          if (sampling_done && ts < 0) ts = cyc;
          @(negedge clk);
        end
        if (ts < 0) ts = cyc;
        samp  += ts - t0;
        total += cyc - t0;
        reads += int'(n_sampled);
        for (int y = 0; y < MB_SIZE; y++)
          for (int x = 0; x < MB_SIZE; x++) begin
            int d;
            cl_pos = mk_pos(x, y);
            #1;
            d = int'(cl_data) - mb[y][x];
            sq += real'(d * d);
            checks++;
            if (int'(cl_data) != ref_val[y][x] || cl_sampled != ref_s[y][x] ||
                (cl_sampled && d != 0)) begin
              failures++;
              if (errs++ < 5)
                $display("FAIL thr %0d mb (%0d,%0d) pixel (%0d,%0d) = %0d expected %0d",
                         t, mx, my, x, y, cl_data, ref_val[y][x]);
            end
          end
      end
    res_reads[ti] = reads;
    res_samp[ti]  = samp;
    res_total[ti] = total;
    res_psnr[ti]  = (sq == 0.0) ? 99.0 :
                    10.0 * $log10(255.0 * 255.0 / (sq / real'(NMB * NMB * NPIX)));
    $display("thr %4d: %5.1f%% of pixels read, PSNR %5.2f dB, sampling %0d cycles, complete %0d cycles (full read %0d)",
             t, 100.0 * real'(reads) / real'(NMB * NMB * NPIX), res_psnr[ti], samp, total, IMG * IMG);
    $display("          page switches: block mapping %0d (full read %0d), linear mapping %0d (full read %0d)",
             n_bswitch, NMB * NMB, n_lswitch, NMB * NMB * MB_SIZE);
    checks++;
    if (n_bswitch != NMB * NMB) begin
      failures++;
      $display("FAIL thr %0d: %0d page switches under block mapping, expected one per macro block", t, n_bswitch);
    end
  endtask

  initial begin
    int thrs [8] = '{1800, 1300, 900, 600, 400, 300, 200, 150};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    foreach (thrs[n]) run_image(n, thrs[n]);
    // a lower threshold refines a superset of the blocks
    for (int n = 0; n < 7; n++) begin
      checks++;
      if (res_reads[n] > res_reads[n+1]) begin
        failures++;
        $display("FAIL: threshold %0d reads fewer pixels than %0d", thrs[n+1], thrs[n]);
      end
    end
    // 1800, 600, 150: fewer reads buy less quality
    checks++;
    if (!(res_reads[0] < res_reads[3] && res_reads[3] < res_reads[7] &&
          res_psnr[0] < res_psnr[3] && res_psnr[3] < res_psnr[7])) begin
      failures++;
      $display("FAIL: thresholds 1800, 600, 150 do not trade reads for quality");
    end
    foreach (thrs[n]) begin
      checks++;
      if (res_samp[n] >= IMG * IMG) begin
        failures++;
        $display("FAIL: thr %0d keeps memory busy %0d cycles", thrs[n], res_samp[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
