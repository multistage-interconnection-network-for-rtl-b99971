// tb_mpsoc_workloads: the 8 x 8 matrix product on several MPSoC
// configurations side by side: 4 and 8 processors with Omega networks, and
// 8 processors with Butterfly and with Baseline networks. Each run checks
// its own result (see matmul_cpus); the testbench prints, per configuration,
// the run time and the blockages in the request and response networks, and
// checks that every run finished and that 8 processors finish before 4.
module tb_mpsoc_workloads;
  import min_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  logic done [NC];
  int c_v [NC], f_v [NC], rt [NC], b1 [NC], b2 [NC];
  int checks = 0, failures = 0;
  string name [NC] = '{"Omega 4", "Omega 8", "Butterfly 8", "Baseline 8"};

  always #5 clk = ~clk;

  mpsoc_run #(.N(4),  .MIN_TYPE(MIN_OMEGA))     r0 (clk, rst_n, done[0], c_v[0], f_v[0], rt[0], b1[0], b2[0]);
  mpsoc_run #(.N(8),  .MIN_TYPE(MIN_OMEGA))     r1 (clk, rst_n, done[1], c_v[1], f_v[1], rt[1], b1[1], b2[1]);
  mpsoc_run #(.N(8),  .MIN_TYPE(MIN_BUTTERFLY)) r2 (clk, rst_n, done[2], c_v[2], f_v[2], rt[2], b1[2], b2[2]);
  mpsoc_run #(.N(8),  .MIN_TYPE(MIN_BASELINE))  r3 (clk, rst_n, done[3], c_v[3], f_v[3], rt[3], b1[3], b2[3]);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all_done;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int i = 0; i < NC; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NC; i++) begin
      checks += c_v[i];
      failures += f_v[i];
      $display("%-12s run time %6d cycles (%7d ns)  BI N1 %4d  BI N2 %4d  total %4d",
               name[i], rt[i], rt[i] * 10, b1[i], b2[i], b1[i] + b2[i]);
    end
    check(rt[1] < rt[0], "8 processors finish before 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
