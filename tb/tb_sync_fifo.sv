// tb_sync_fifo: random pushes and pops on a 4-entry FIFO, compared against a
// queue kept by the testbench. Checks the head word, the full and empty
// flags, that a word written in cycle t is visible from cycle t+1, and that
// a push into a full FIFO that pops at the same time is accepted.
module tb_sync_fifo;
  localparam int unsigned W = 8, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0, n_simul = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    // one word: visible one cycle after the write
    wr_en = 1; wr_data = 8'hA5;
    @(negedge clk);
    wr_en = 0;
    check(!empty && rd_data == 8'hA5, "word visible the cycle after the write");
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    check(empty, "empty after the pop");
    // random traffic
    for (int c = 0; c < 1000; c++) begin
      wr_en   = ($urandom_range(0, 99) < 55);
      rd_en   = ($urandom_range(0, 99) < 50) && (q.size() != 0);
      wr_data = W'($urandom);
      if (wr_en && q.size() == DEPTH && !rd_en) wr_en = 0;
      // flags and head before the edge
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() != 0) check(rd_data == q[0], "head word");
      if (full) n_full++;
      if (full && wr_en && rd_en) n_simul++;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0; rd_en = 0;
    check(n_full > 0, "FIFO reached full");
    $display("full seen %0d times, push+pop while full %0d times", n_full, n_simul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
