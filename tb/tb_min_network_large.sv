// tb_min_network_large: runs min_net_check on Omega networks of 32 and 64
// lines in parallel (the larger network sizes; tb_min_network covers 4 to
// 16 lines). Expected: minimum latency 15 and 18 cycles, maximum latency 46
// and 81 cycles.
// For every size it checks the minimum latency 3*log2(N) cycles and the
// maximum latency 3*log2(N) + N-1 cycles (all sources to one destination),
// and correct delivery under random traffic.
module tb_min_network_large;
  import min_pkg::*;
  localparam int NC = 2;
  logic clk = 0, start = 0;
  logic done [NC];
  int   checks_v [NC], failures_v [NC], lmin [NC], lmax [NC];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;


  min_net_check #(.N(32), .MIN_TYPE(MIN_OMEGA)) c0 (clk, start, done[0], checks_v[0], failures_v[0], lmin[0], lmax[0]);
  min_net_check #(.N(64), .MIN_TYPE(MIN_OMEGA)) c1 (clk, start, done[1], checks_v[1], failures_v[1], lmin[1], lmax[1]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (2) @(negedge clk);
    start = 1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int i = 0; i < NC; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NC; i++) begin
      checks += checks_v[i];
      failures += failures_v[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

