// tb_conn_interchange: random stimulus on both logical and both physical
// sides; checks that with switch_sel = 0 queue 0 serves FIFO_A and queue 1
// FIFO_B, the reverse with switch_sel = 1, and that the idle side of each
// queue is never pushed or popped.
module tb_conn_interchange;
  import ipa_pkg::*;
  int checks = 0, failures = 0;

  logic   switch_sel, a_rd_en, a_empty, b_wr_en, b_full;
  block_t a_dout, b_din;
  logic   q0_wr_en, q0_rd_en, q0_full, q0_empty;
  logic   q1_wr_en, q1_rd_en, q1_full, q1_empty;
  block_t q0_din, q0_dout, q1_din, q1_dout;

  conn_interchange dut (.*);

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h (sel %b)", what, got, exp, switch_sel);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      switch_sel = 1'($urandom);
      a_rd_en    = 1'($urandom);
      b_wr_en    = 1'($urandom);
      b_din      = block_t'($urandom);
      q0_dout    = block_t'($urandom);
      q1_dout    = block_t'($urandom);
      {q0_full, q0_empty, q1_full, q1_empty} = 4'($urandom);
      #1;
      if (!switch_sel) begin
        expect_eq(32'(a_dout), 32'(q0_dout), "a_dout");
        expect_eq(32'(a_empty), 32'(q0_empty), "a_empty");
        expect_eq(32'(b_full), 32'(q1_full), "b_full");
        expect_eq(32'(q0_rd_en), 32'(a_rd_en), "q0_rd_en");
        expect_eq(32'(q1_wr_en), 32'(b_wr_en), "q1_wr_en");
        expect_eq(32'({q0_wr_en, q1_rd_en}), 0, "idle side");
        expect_eq(32'(q1_din), 32'(b_din), "q1_din");
      end else begin
        expect_eq(32'(a_dout), 32'(q1_dout), "a_dout");
        expect_eq(32'(a_empty), 32'(q1_empty), "a_empty");
        expect_eq(32'(b_full), 32'(q0_full), "b_full");
        expect_eq(32'(q1_rd_en), 32'(a_rd_en), "q1_rd_en");
        expect_eq(32'(q0_wr_en), 32'(b_wr_en), "q0_wr_en");
        expect_eq(32'({q1_wr_en, q0_rd_en}), 0, "idle side");
        expect_eq(32'(q0_din), 32'(b_din), "q0_din");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
