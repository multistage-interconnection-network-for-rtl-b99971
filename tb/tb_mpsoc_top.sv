// tb_mpsoc_top: end-to-end test of the MPSoC at its default size (8
// processors, 8 data memories, Omega request and response networks).
//
// The eight processors are replaced by matmul_cpus, which runs the traffic
// of an 8 x 8 matrix product through the networks and checks every answer
// and the result. This testbench also loads a program image into every
// instruction memory and fetches it back, and checks that the mechanisms of
// the design all occurred: reads and writes answered through both networks,
// blockages (messages waiting in a switch FIFO) and conflicts (two messages
// wanting one switch output) in the request and the response network.
// It prints the application run time in cycles and at the 10 ns clock.
module tb_mpsoc_top;
  localparam int unsigned N = 8, DMEM_WORDS = 1024;
  localparam int unsigned LOGN = $clog2(N);
  logic clk = 0, rst_n = 0;

  logic [31:0]     imem_fetch_addr [N];
  logic [31:0]     imem_fetch_data [N];
  logic            imem_load_we    [N];
  logic [31:0]     imem_load_addr  [N];
  logic [31:0]     imem_load_data  [N];
  logic            dreq_valid  [N];
  logic            dreq_ready  [N];
  logic            dreq_we     [N];
  logic [31:0]     dreq_addr   [N];
  logic [31:0]     dreq_wdata  [N];
  logic            dresp_valid [N];
  logic            dresp_ready [N];
  logic            dresp_we    [N];
  logic [LOGN-1:0] dresp_mem   [N];
  logic [31:0]     dresp_rdata [N];
  logic [31:0]     bi_n1, bi_n2, conf_n1, conf_n2;

  logic done;
  int   m_checks, m_failures, runtime, n_reads, n_writes, n_held, lat_min, lat_max;
  int   checks = 0, failures = 0;

  mpsoc_top dut (.*);

  matmul_cpus #(.N(N), .M(8), .DMEM_WORDS(DMEM_WORDS)) cpus (
    .clk, .rst_n, .dreq_valid, .dreq_ready, .dreq_we, .dreq_addr, .dreq_wdata,
    .dresp_valid, .dresp_ready, .dresp_we, .dresp_mem, .dresp_rdata,
    .done, .checks(m_checks), .failures(m_failures), .runtime, .n_reads,
    .n_writes, .n_held, .lat_min, .lat_max
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [31:0] prog_word(int p, int i);
    return 32'h2400_0000 ^ 32'(p << 20) ^ 32'(i * 32'h0001_0203);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++) begin
      imem_fetch_addr[p] = '0; imem_load_we[p] = 0;
      imem_load_addr[p] = '0; imem_load_data[p] = '0;
    end
    repeat (3) @(negedge clk);
    // load a 32-word program into every instruction memory, then fetch it
    for (int i = 0; i < 32; i++) begin
      for (int p = 0; p < N; p++) begin
        imem_load_we[p] = 1; imem_load_addr[p] = 32'(4 * i); imem_load_data[p] = prog_word(p, i);
      end
      @(negedge clk);
    end
    for (int p = 0; p < N; p++) imem_load_we[p] = 0;
    for (int i = 0; i < 32; i++) begin
      for (int p = 0; p < N; p++) imem_fetch_addr[p] = 32'(4 * ((i + p) % 32));
      @(negedge clk);
      for (int p = 0; p < N; p++)
        check(imem_fetch_data[p] == prog_word(p, (i + p) % 32), "instruction fetch");
    end

    rst_n = 1;
    wait (done);
    checks += m_checks;
    failures += m_failures;
    $display("matrix product 8x8 on %0d processors: run time %0d cycles = %0d ns",
             N, runtime, runtime * 10);
    $display("reads %0d, writes %0d, access latency %0d..%0d cycles, requests held %0d",
             n_reads, n_writes, lat_min, lat_max, n_held);
    $display("blockages: network 1 %0d, network 2 %0d, total %0d; conflicts %0d / %0d",
             bi_n1, bi_n2, bi_n1 + bi_n2, conf_n1, conf_n2);
    check(n_reads > 0,  "mechanism: reads answered with data");
    check(n_writes > 0, "mechanism: writes acknowledged");
    check(bi_n1 > 0,    "mechanism: blockage in the request network");
    check(bi_n2 > 0,    "mechanism: blockage in the response network");
    check(conf_n1 > 0,  "mechanism: arbitration conflict in the request network");
    check(conf_n2 > 0,  "mechanism: arbitration conflict in the response network");
    check(lat_max > lat_min, "mechanism: contention lengthened some accesses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
