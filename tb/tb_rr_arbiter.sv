// tb_rr_arbiter: drives random request pairs and enables into the two-input
// round-robin arbiter and compares every grant with a reference model that
// keeps its own priority bit. Also checks the alternation of two inputs that
// request all the time.
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0;
  logic en = 0;
  logic [1:0] req = '0, gnt;
  logic conflict;
  int checks = 0, failures = 0;
  bit ref_prio = 0;
  logic [1:0] exp_gnt;

  rr_arbiter dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [1:0] model(bit e, logic [1:0] r, bit p);
    if (!e) return 2'b00;
    if (r == 2'b11) return p ? 2'b10 : 2'b01;
    return r;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // both inputs request all the time: grants must alternate 0,1,0,1...
    en = 1; req = 2'b11;
    for (int c = 0; c < 6; c++) begin
      #1;
      check(gnt == ((c % 2 == 0) ? 2'b01 : 2'b10), $sformatf("alternation step %0d", c));
      check(conflict, "conflict flagged");
      @(negedge clk);
    end
    // six grants, the last to input 1: input 0 has priority again
    ref_prio = 0;
    for (int c = 0; c < 1000; c++) begin
      en  = ($urandom_range(0, 3) != 0);
      req = 2'($urandom);
      #1;
      exp_gnt = model(en, req, ref_prio);
      check(gnt == exp_gnt, $sformatf("grant en=%0b req=%b exp=%b got=%b", en, req, exp_gnt, gnt));
      check(conflict == (en && req == 2'b11), "conflict flag");
      @(posedge clk);
      if (exp_gnt[0]) ref_prio = 1;
      else if (exp_gnt[1]) ref_prio = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
