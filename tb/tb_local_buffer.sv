// tb_local_buffer: random sample writes and tagged interpolation writes
// against a model of the canvas rules: a sample always wins and marks the
// pixel sampled; an interpolated value is stored only if its level is not
// coarser than the pixel's tag; among same-cycle interpolation writes to one
// pixel the finer level, then the lower port, wins. Reads are checked on all
// ports, and the sampled-pixel count after each cycle.
module tb_local_buffer;
  import ipa_pkg::*;
  localparam int NRD = 4;
  localparam int NWI = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr = 1'b0, s_we = 1'b0;
  pos_t s_pos = '0;
  pix_t s_data = '0;
  logic [NWI-1:0] i_we = '0;
  pos_t [NWI-1:0] i_pos = '0;
  lvl_t [NWI-1:0] i_lvl = '0;
  pix_t [NWI-1:0] i_data = '0;
  pos_t [NRD-1:0] rd_pos = '0;
  pix_t [NRD-1:0] rd_data;
  logic [NRD-1:0] rd_sampled;
  logic [$clog2(NPIX+1)-1:0] n_sampled;

  local_buffer dut (.*);

  int mval [MB_SIZE][MB_SIZE];
  int mtag [MB_SIZE][MB_SIZE];
  int mcount;
  int n_reject = 0, n_override = 0;

  function automatic pos_t rnd_pos();
    // a small window so that writes collide often
    return mk_pos($urandom_range(3), $urandom_range(3));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    foreach (mtag[y, x]) begin mtag[y][x] = 7; mval[y][x] = -1; end
    mcount = 0;
    for (int n = 0; n < 5000; n++) begin
      s_we  = ($urandom_range(9) == 0);
      s_pos = rnd_pos();
      s_data = pix_t'($urandom);
      for (int k = 0; k < NWI; k++) begin
        i_we[k]   = 1'($urandom);
        i_pos[k]  = rnd_pos();
        i_lvl[k]  = lvl_t'($urandom_range(1, 4));
        i_data[k] = pix_t'($urandom);
      end
      if (n % 1000 == 999) begin s_we = 1'b0; i_we = '0; clr = 1'b1; end
      else clr = 1'b0;
      // model update
      if (clr) begin
        foreach (mtag[y, x]) mtag[y][x] = 7;
        mcount = 0;
      end else begin

        for (int k = 0; k < NWI; k++) begin
          bit win;
          win = i_we[k] && int'(i_lvl[k]) <= mtag[i_pos[k].y][i_pos[k].x] &&
                !(s_we && s_pos == i_pos[k]);
          for (int m = 0; m < NWI; m++)
            if (m != k && i_we[m] && i_pos[m] == i_pos[k] &&
                (i_lvl[m] < i_lvl[k] || (i_lvl[m] == i_lvl[k] && m < k))) win = 0;
          if (i_we[k] && !win && !(s_we && s_pos == i_pos[k])) n_reject++;
          if (win) begin
            if (mtag[i_pos[k].y][i_pos[k].x] != 7) n_override++;
            mtag[i_pos[k].y][i_pos[k].x] = i_lvl[k];
            mval[i_pos[k].y][i_pos[k].x] = i_data[k];
          end
        end
        if (s_we) begin
          if (mtag[s_pos.y][s_pos.x] != 0) mcount++;
          mtag[s_pos.y][s_pos.x] = 0;
          mval[s_pos.y][s_pos.x] = s_data;
        end
      end
      @(negedge clk);
      s_we = 1'b0; i_we = '0; clr = 1'b0;
      for (int r = 0; r < NRD; r++) rd_pos[r] = rnd_pos();
      #1;
      for (int r = 0; r < NRD; r++) begin
        int x, y;
        x = rd_pos[r].x;
        y = rd_pos[r].y;
        checks++;
        if (rd_sampled[r] != (mtag[y][x] == 0) ||
            (mtag[y][x] != 7 && int'(rd_data[r]) != mval[y][x])) begin
          failures++;
          if (failures < 5) $display("FAIL (%0d,%0d) %0d/%b exp %0d tag %0d", x, y,
                                     rd_data[r], rd_sampled[r], mval[y][x], mtag[y][x]);
        end
      end
      checks++;
      if (int'(n_sampled) != mcount) begin
        failures++;
        $display("FAIL n_sampled %0d exp %0d", n_sampled, mcount);
      end
    end
    checks++;
    if (n_reject == 0 || n_override == 0) begin
      failures++;
      $display("FAIL: rule not exercised (reject %0d override %0d)", n_reject, n_override);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
