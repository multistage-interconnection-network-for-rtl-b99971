// min_net_check: test driver for one min_network configuration (N lines,
// network type MIN_TYPE). Used by tb_min_network, which runs several sizes
// and types side by side. It runs three tests after `start`:
//  1. lone messages: one message at a time from source s to destination d;
//     each must arrive on output d after exactly 3*log2(N) cycles (the
//     minimum latency). All pairs for N <= 16, a spread of pairs above.
//  2. hot spot: all N sources send to destination 0 in the same cycle; the
//     first arrives after 3*log2(N) cycles and the last after
//     3*log2(N) + N-1 cycles (the maximum latency).
//  3. random traffic with random back-pressure at the outputs: every message
//     arrives once, on the output of its destination, in order for each
//     source/destination pair.
// Results are returned on checks/failures when `done` rises.
module min_net_check
  import min_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter min_type_e   MIN_TYPE = MIN_OMEGA
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   lat_min,
  output int   lat_max
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned PW   = 24;   // {source[7:0], sequence[15:0]}
  localparam int unsigned CW   = $clog2(N * LOGN + 1);

  logic            rst_n = 0;
  logic            in_valid  [N];
  logic            in_ready  [N];
  logic [LOGN-1:0] in_dest   [N];
  logic [PW-1:0]   in_data   [N];
  logic            out_valid [N];
  logic            out_ready [N];
  logic [LOGN-1:0] out_dest  [N];
  logic [PW-1:0]   out_data  [N];
  logic [CW-1:0]   blocked_count, conflict_count;
  int              n_blocked = 0;

  min_network #(.N(N), .PW(PW), .MIN_TYPE(MIN_TYPE), .FIFO_DEPTH(64)) dut (.*);

  initial begin
    done = 0; checks = 0; failures = 0; lat_min = 0; lat_max = 0;
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 0; in_dest[i] = '0; in_data[i] = '0; out_ready[i] = 1;
    end
  end

  always @(negedge clk) if (rst_n) n_blocked += int'(blocked_count);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [N=%0d type=%0d]: %s", N, MIN_TYPE, msg);
    end
  endtask

  // expected destination of each message in flight, keyed by payload
  int unsigned exp_dest [logic [PW-1:0]];
  // last sequence number received per source/destination pair
  int last_seq [N][N];

  initial begin
    int cyc;
    int seen;
    int first_arr, last_arr;
    int unsigned seq [N];
    wait (start);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. lone messages
    for (int s = 0; s < N; s++) begin
      for (int d = 0; d < N; d++) begin
        if (N > 16 && ((s * 7 + d) % (N / 8) != 0)) continue;
        in_valid[s] = 1; in_dest[s] = LOGN'(d); in_data[s] = {8'(s), 16'(d)};
        @(negedge clk);
        in_valid[s] = 0;
        cyc = 1;
        while (!out_valid[d] && cyc < 4 * LOGN + 10) begin @(negedge clk); cyc++; end
        check(cyc == 3 * LOGN, $sformatf("lone %0d->%0d took %0d cycles, expected %0d",
                                          s, d, cyc, 3 * LOGN));
        check(out_valid[d] && out_data[d] == {8'(s), 16'(d)}, $sformatf("lone %0d->%0d content", s, d));
        for (int o = 0; o < N; o++)
          if (o != d) check(!out_valid[o], "lone message appears on one output only");
        @(negedge clk);
      end
    end
    lat_min = 3 * LOGN;

    // 2. hot spot: everyone to destination 0 at once
    for (int s = 0; s < N; s++) begin
      in_valid[s] = 1; in_dest[s] = '0; in_data[s] = {8'(s), 16'hBEEF};
    end
    @(negedge clk);
    for (int s = 0; s < N; s++) in_valid[s] = 0;
    cyc = 1; seen = 0; first_arr = 0; last_arr = 0;
    while (seen < N && cyc < 3 * LOGN + 2 * N + 10) begin
      if (out_valid[0]) begin
        seen++;
        if (seen == 1) first_arr = cyc;
        last_arr = cyc;
      end
      for (int o = 1; o < N; o++) if (out_valid[o]) check(0, "hot spot message on a wrong output");
      @(negedge clk);
      cyc++;
    end
    check(seen == N, $sformatf("hot spot delivered %0d of %0d", seen, N));
    check(first_arr == 3 * LOGN, $sformatf("hot spot first after %0d, expected %0d", first_arr, 3 * LOGN));
    check(last_arr == 3 * LOGN + N - 1,
          $sformatf("hot spot last after %0d, expected %0d", last_arr, 3 * LOGN + N - 1));
    lat_max = last_arr;
    check(n_blocked > 0, "hot spot blocked messages");
    repeat (3) @(negedge clk);

    // 3. random traffic
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) last_seq[s][d] = -1;
    for (int s = 0; s < N; s++) seq[s] = 0;
    for (int c = 0; c < 3000; c++) begin
      bit go [N];
      for (int s = 0; s < N; s++) begin
        if (!in_valid[s] || in_ready[s]) begin
          in_valid[s] = ($urandom_range(0, 99) < 40) && (c < 2500);
          in_dest[s]  = LOGN'($urandom);
          in_data[s]  = {8'(s), 16'(seq[s])};
          seq[s]++;
        end
      end
      for (int o = 0; o < N; o++) out_ready[o] = ($urandom_range(0, 99) < 75);
      #1;
      for (int o = 0; o < N; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          int src, sq;
          src = int'(out_data[o][23:16]);
          sq  = int'(out_data[o][15:0]);
          check(out_dest[o] == LOGN'(o), "random: message on the line of its destination");
          if (!exp_dest.exists(out_data[o])) begin
            check(0, "random: unknown or repeated message");
          end else begin
            check(exp_dest[out_data[o]] == o, "random: right destination");
            exp_dest.delete(out_data[o]);
          end
          check(sq > last_seq[src][o], "random: order kept per source and destination");
          last_seq[src][o] = sq;
        end
      end
      for (int s = 0; s < N; s++) go[s] = in_valid[s] && in_ready[s];
      @(posedge clk);
      for (int s = 0; s < N; s++)
        if (go[s]) exp_dest[in_data[s]] = int'(in_dest[s]);
      @(negedge clk);
      for (int s = 0; s < N; s++) if (go[s]) in_valid[s] = 0;
    end
    check(exp_dest.num() == 0, $sformatf("random: %0d messages not delivered", exp_dest.num()));
    $display("N=%0d type=%0d: latency min %0d max %0d cycles (%0d / %0d ns at 10 ns), blocked %0d",
             N, MIN_TYPE, lat_min, lat_max, lat_min * 10, lat_max * 10, n_blocked);
    done = 1;
  end
endmodule
