// tb_sync_fifo: random pushes, pops and clears against a queue model.
// Checks dout, full, empty and count every cycle, never pushing into a full
// queue or popping an empty one (the design's users guarantee that).
module tb_sync_fifo;
  localparam int W = 13;
  localparam int D = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clr = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo dut (.*);

  logic [W-1:0] model [$];
  int n_full = 0;

  task automatic check_state();
    checks++;
    if (int'(count) != model.size() || empty != (model.size() == 0) ||
        full != (model.size() == D) || (model.size() > 0 && dout != model[0])) begin
      failures++;
      if (failures < 5)
        $display("FAIL count %0d/%0d empty %b full %b dout %h exp %h", count, model.size(),
                 empty, full, dout, model.size() ? model[0] : '0);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      check_state();
      // phases biased towards filling, then towards draining
      wr_en = !full && ($urandom_range(99) < (((n / 500) % 2) ? 30 : 80));
      rd_en = !empty && ($urandom_range(99) < (((n / 500) % 2) ? 80 : 30));
      din   = W'($urandom);
      clr   = ($urandom_range(999) == 0);
      @(posedge clk);
      #1;
      if (full) n_full++;
      if (clr) model.delete();
      else begin
        if (rd_en) void'(model.pop_front());
        if (wr_en) model.push_back(din);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
