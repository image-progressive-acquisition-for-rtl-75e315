// tb_addr_map: checks both storage layouts against an independent model.
// A small 3 x 2 macro block image is walked pixel by pixel: every pixel must
// get a distinct (page, column) pair, a macro block must occupy one page under
// block mapping and 17 pages under linear mapping, and neighbouring pixels of
// an image row must sit in neighbouring columns of one page under linear
// mapping. Random macro block coordinates then check the formulas over the
// full 8-bit range, also on an instance left at the default parameters
// (block mapping, 31 macro blocks per row).
module tb_addr_map;
  import ipa_pkg::*;
  int checks = 0, failures = 0;

  localparam int MBPR = 3;
  localparam int MBR  = 2;

  logic [7:0]  mb_x, mb_y;
  pos_t        pos;
  logic [15:0] lin_page, lin_col, blk_page, blk_col, def_page, def_col;

  addr_map #(.MAPPING(0), .MB_PER_ROW(MBPR)) dut_lin (
    .mb_x, .mb_y, .pos, .page(lin_page), .col(lin_col)
  );
  addr_map #(.MAPPING(1), .MB_PER_ROW(MBPR)) dut_blk (
    .mb_x, .mb_y, .pos, .page(blk_page), .col(blk_col)
  );

  addr_map dut_def (.mb_x, .mb_y, .pos, .page(def_page), .col(def_col));

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d (mb %0d,%0d pos %0d,%0d)",
               what, got, exp, mb_x, mb_y, pos.x, pos.y);
    end
  endtask

  // Image-coordinate model.
  task automatic check_one();
    int ix, iy;
    ix = int'(mb_x) * MB_SIZE + int'(pos.x);
    iy = int'(mb_y) * MB_SIZE + int'(pos.y);
    expect_eq(int'(lin_page), iy % 65536, "linear page");
    expect_eq(int'(lin_col), ix % 65536, "linear column");
    expect_eq(int'(blk_page), (int'(mb_y) * MBPR + int'(mb_x)) % 65536, "block page");
    expect_eq(int'(blk_col), int'(pos.y) * MB_SIZE + int'(pos.x), "block column");
  endtask

  bit seen_lin [int];
  bit seen_blk [int];
  bit pages    [int];
  int prev_col;

  initial begin
    // Walk the small image.
    for (int by = 0; by < MBR; by++) begin
      for (int bx = 0; bx < MBPR; bx++) begin
        mb_x = 8'(bx);
        mb_y = 8'(by);
        pages.delete();
        for (int y = 0; y < MB_SIZE; y++) begin
          for (int x = 0; x < MB_SIZE; x++) begin
            pos = mk_pos(coord_t'(x), coord_t'(y));
            #1;
            check_one();
            checks++;
            if (seen_lin.exists(int'(lin_page) * 65536 + int'(lin_col))) begin
              failures++;
              $display("FAIL linear address reused at pos %0d,%0d", x, y);
            end
            seen_lin[int'(lin_page) * 65536 + int'(lin_col)] = 1'b1;
            checks++;
            if (seen_blk.exists(int'(blk_page) * 65536 + int'(blk_col))) begin
              failures++;
              $display("FAIL block address reused at pos %0d,%0d", x, y);
            end
            seen_blk[int'(blk_page) * 65536 + int'(blk_col)] = 1'b1;
            pages[int'(lin_page)] = 1'b1;
            if (x > 0) expect_eq(int'(lin_col), prev_col + 1, "linear row contiguity");
            prev_col = int'(lin_col);
            expect_eq(int'(blk_page), by * MBPR + bx, "one page per macro block");
          end
        end
        expect_eq(pages.num(), MB_SIZE, "linear pages per macro block");
      end
    end
    expect_eq(seen_lin.num(), MBPR * MBR * NPIX, "linear distinct addresses");
    expect_eq(seen_blk.num(), MBPR * MBR * NPIX, "block distinct addresses");

    // Random macro block coordinates over the full input range.
    for (int n = 0; n < 3000; n++) begin
      mb_x = 8'($urandom);
      mb_y = 8'($urandom);
      pos  = mk_pos(coord_t'($urandom_range(0, MB_SIZE - 1)),
                    coord_t'($urandom_range(0, MB_SIZE - 1)));
      #1;
      check_one();
      expect_eq(int'(def_page), (int'(mb_y) * 31 + int'(mb_x)) % 65536, "default page");
      expect_eq(int'(def_col), int'(pos.y) * MB_SIZE + int'(pos.x), "default column");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $display("FAIL watchdog timeout");
    $finish;
  end
endmodule
