// tb_min_switch: a 2x2 switch routing on destination bit 1 of a 2-bit
// destination, with 4-entry FIFOs.
//  - a lone message crosses in exactly 3 cycles, to the output its
//    destination bit names;
//  - two messages for the same output: one after 3 cycles, the other one
//    cycle later, the winner chosen by round robin;
//  - two messages for different outputs both cross in 3 cycles;
//  - random traffic with random back-pressure: every message comes out of the
//    right output, once, in order per input, and both FIFOs fill up.
module tb_min_switch;
  localparam int unsigned DW = 2, PW = 8;
  logic clk = 0, rst_n = 0;
  logic          in_valid  [2] = '{0, 0};
  logic          in_ready  [2];
  logic [DW-1:0] in_dest   [2] = '{0, 0};
  logic [PW-1:0] in_data   [2] = '{0, 0};
  logic          out_valid [2];
  logic          out_ready [2] = '{1, 1};
  logic [DW-1:0] out_dest  [2];
  logic [PW-1:0] out_data  [2];
  logic [1:0]    blocked, conflict;
  int checks = 0, failures = 0;
  int n_blocked = 0, n_conflict = 0, n_full = 0;

  min_switch #(.DW(DW), .PW(PW), .ROUTE_BIT(1), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      n_blocked  += int'(blocked[0]) + int'(blocked[1]);
      n_conflict += int'(conflict[0]) + int'(conflict[1]);
      if (!in_ready[0] || !in_ready[1]) n_full++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait for a message on output o, return the number of cycles waited
  task automatic wait_out(int o, output int cycles, output logic [PW-1:0] data);
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!out_valid[o] && cycles < 50);
    data = out_data[o];
  endtask

  logic [PW-1:0] exp_q [2][2][$];  // [input][output]

  initial begin
    int cyc, cyc2;
    logic [PW-1:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. lone message, input 0, destination 2 (bit 1 = 1): lower output
    in_valid[0] = 1; in_dest[0] = 2'd2; in_data[0] = 8'h11;
    @(negedge clk);
    in_valid[0] = 0;
    cyc = 1;
    while (!out_valid[1] && cyc < 50) begin @(negedge clk); cyc++; end
    check(cyc == 3, $sformatf("lone message took %0d cycles, expected 3", cyc));
    check(out_data[1] == 8'h11 && out_dest[1] == 2'd2, "lone message content");
    check(!out_valid[0], "nothing on the other output");
    @(negedge clk);
    check(!out_valid[1], "message delivered once");

    // 2. both inputs for the upper output in the same cycle
    in_valid = '{1, 1}; in_dest = '{2'd1, 2'd0}; in_data = '{8'h20, 8'h21};
    @(negedge clk);
    in_valid = '{0, 0};
    cyc = 1;
    while (!out_valid[0] && cyc < 50) begin @(negedge clk); cyc++; end
    check(cyc == 3, $sformatf("first of two took %0d cycles, expected 3", cyc));
    check(out_data[0] == 8'h20, "input 0 wins first (reset priority)");
    @(negedge clk);
    check(out_valid[0] && out_data[0] == 8'h21, "loser follows one cycle later");
    @(negedge clk);
    check(!out_valid[0], "two messages, two deliveries");

    // round robin: two messages on each input, all for the upper output,
    // must leave alternating between the inputs (a fixed priority would
    // send both of input 0 first)
    in_valid = '{1, 1}; in_dest = '{2'd0, 2'd1}; in_data = '{8'h30, 8'h31};
    @(negedge clk);
    in_data = '{8'h32, 8'h33};
    @(negedge clk);
    in_valid = '{0, 0};
    @(negedge clk);
    check(out_valid[0] && out_data[0] == 8'h30, "round robin: input 0 first");
    @(negedge clk);
    check(out_valid[0] && out_data[0] == 8'h31, "round robin: then input 1");
    @(negedge clk);
    check(out_valid[0] && out_data[0] == 8'h32, "round robin: then input 0");
    @(negedge clk);
    check(out_valid[0] && out_data[0] == 8'h33, "round robin: then input 1");
    @(negedge clk);

    // 3. different outputs in the same cycle
    in_valid = '{1, 1}; in_dest = '{2'd3, 2'd0}; in_data = '{8'h40, 8'h41};
    @(negedge clk);
    in_valid = '{0, 0};
    @(negedge clk);
    @(negedge clk);
    check(out_valid[0] && out_data[0] == 8'h41, "parallel: upper output after 3 cycles");
    check(out_valid[1] && out_data[1] == 8'h40, "parallel: lower output after 3 cycles");
    @(negedge clk);

    // 4. random traffic with back-pressure
    for (int c = 0; c < 2000; c++) begin
      bit go [2];
      for (int i = 0; i < 2; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = ($urandom_range(0, 99) < 60) && (c < 1800);
          in_dest[i]  = DW'($urandom);
          in_data[i]  = {1'(i), 7'(c)};
        end
      end
      out_ready[0] = ($urandom_range(0, 99) < 50);
      out_ready[1] = ($urandom_range(0, 99) < 70);
      #1;
      // outputs seen before the edge
      for (int o = 0; o < 2; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          int src;
          src = int'(out_data[o][7]);
          check(out_dest[o][1] == 1'(o), "message left by the output its bit names");
          if (exp_q[src][o].size() == 0) begin
            check(0, "unexpected message");
          end else begin
            check(out_data[o] == exp_q[src][o].pop_front(), "order per input and output");
          end
        end
      end
      for (int i = 0; i < 2; i++) go[i] = in_valid[i] && in_ready[i];
      @(posedge clk);
      for (int i = 0; i < 2; i++)
        if (go[i]) exp_q[i][int'(in_dest[i][1])].push_back(in_data[i]);
      @(negedge clk);
      for (int i = 0; i < 2; i++) if (go[i]) in_valid[i] = 0;
    end
    for (int i = 0; i < 2; i++)
      for (int o = 0; o < 2; o++)
        check(exp_q[i][o].size() == 0, $sformatf("messages lost from input %0d to output %0d", i, o));
    check(n_blocked > 0, "messages waited in a FIFO");
    check(n_conflict > 0, "conflicts occurred");
    check(n_full > 0, "a FIFO filled up");
    $display("blocked %0d, conflicts %0d, full %0d", n_blocked, n_conflict, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
