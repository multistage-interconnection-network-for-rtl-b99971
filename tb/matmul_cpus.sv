// matmul_cpus: behavioural stand-in for the N processors of the MPSoC,
// driving their data ports with the traffic of a matrix product C = A x B of
// M x M matrices. It is a test model, not synthesizable.
//
// Like the processors it replaces, each one is blocking: it issues one read
// or write and waits for the answer before the next. Row r of A, B and C is
// kept in data memory r mod N (A at word 0, B at word 256, C at word 512 of
// the row block r div N), so every processor reaches every memory. Phase 1:
// processor p writes the rows of A and B it owns. Phase 2, after all have
// finished phase 1: processor p computes the rows r with r mod N == p,
// reading A[r][k] and B[k][c] for every term and writing C[r][c]. Phase 3:
// processor 0 reads back all of C. Between two accesses a processor spends
// 0 to THINK_MAX cycles (uniformly drawn) executing instructions, which
// keeps the processors from running in lockstep.
//
// Checks: every answer names the memory the address selects and carries the
// right write flag; every read returns the last value written (shadow copy);
// C equals the product computed here; the quickest access took exactly the
// uncontended round trip 6*log2(N)+1 cycles. `runtime` is the number of
// cycles of phase 2, up to the acknowledgement of the last write.
module matmul_cpus #(
  parameter int unsigned N          = 8,
  parameter int unsigned M          = 8,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned THINK_MAX  = 4,
  localparam int unsigned LOGN      = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            dreq_valid  [N],
  input  logic            dreq_ready  [N],
  output logic            dreq_we     [N],
  output logic [31:0]     dreq_addr   [N],
  output logic [31:0]     dreq_wdata  [N],
  input  logic            dresp_valid [N],
  output logic            dresp_ready [N],
  input  logic            dresp_we    [N],
  input  logic [LOGN-1:0] dresp_mem   [N],
  input  logic [31:0]     dresp_rdata [N],
  output logic            done,
  output int              checks,
  output int              failures,
  output int              runtime,
  output int              n_reads,
  output int              n_writes,
  output int              n_held,
  output int              lat_min,
  output int              lat_max
);
  logic [31:0] a [M][M];
  logic [31:0] b [M][M];
  logic [31:0] c_ref [M][M];
  logic [31:0] shadow [logic [31:0]];
  int          phase1_done = 0;
  int          phase2_done = 0;
  int          last_ack_cycle = 0;
  int          cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    done = 0; checks = 0; failures = 0; runtime = 0;
    n_reads = 0; n_writes = 0; n_held = 0; lat_min = 1 << 30; lat_max = 0;
    for (int p = 0; p < N; p++) begin
      dreq_valid[p] = 0; dreq_we[p] = 0; dreq_addr[p] = '0; dreq_wdata[p] = '0;
      dresp_ready[p] = 1;
    end
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        a[r][c] = 32'($urandom_range(0, 255));
        b[r][c] = 32'($urandom_range(0, 255));
      end
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        c_ref[r][c] = '0;
        for (int k = 0; k < M; k++) c_ref[r][c] += a[r][k] * b[k][c];
      end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [N=%0d]: %s", N, msg);
    end
  endtask

  // byte address of element [r][c] of matrix mat (0 = A, 1 = B, 2 = C)
  function automatic logic [31:0] elem_addr(int mat, int r, int c);
    return 32'((r % N) * 4 * DMEM_WORDS + 4 * (mat * 256 + (r / N) * M + c));
  endfunction

  // one blocking access by processor p; called at a falling clock edge
  task automatic access(int p, bit we, logic [31:0] addr, logic [31:0] wdata,
                        output logic [31:0] rdata);
    int lat;
    dreq_valid[p] = 1; dreq_we[p] = we; dreq_addr[p] = addr; dreq_wdata[p] = wdata;
    lat = 0;
    while (!dreq_ready[p]) begin
      n_held++;
      @(negedge clk);
      lat++;
    end
    @(negedge clk);  // request taken at the rising edge just passed
    lat++;
    dreq_valid[p] = 0;
    while (!dresp_valid[p]) begin
      @(negedge clk);
      lat++;
    end
    check(dresp_mem[p] == LOGN'(addr / (4 * DMEM_WORDS)), "answer from the addressed memory");
    check(dresp_we[p] == we, "answer carries the access type");
    if (we) begin
      shadow[addr] = wdata;
      n_writes++;
      last_ack_cycle = cycle;
      rdata = '0;
    end else begin
      rdata = dresp_rdata[p];
      check(shadow.exists(addr) && rdata == shadow[addr],
            $sformatf("proc %0d read %h from %h", p, rdata, addr));
      n_reads++;
    end
    if (lat < lat_min) lat_min = lat;
    if (lat > lat_max) lat_max = lat;
    @(negedge clk);  // answer taken at the rising edge just passed
    // instructions executed before the next memory access
    repeat ($urandom_range(0, THINK_MAX)) @(negedge clk);
  endtask

  task automatic run_proc(int p);
    logic [31:0] x, y, sum, dummy;
    // phase 1: store the owned rows of A and B
    for (int r = p; r < M; r += N)
      for (int c = 0; c < M; c++) begin
        access(p, 1, elem_addr(0, r, c), a[r][c], dummy);
        access(p, 1, elem_addr(1, r, c), b[r][c], dummy);
      end
    phase1_done++;
    wait (phase1_done == N);
    @(negedge clk);
    // phase 2: compute the owned rows of C
    for (int r = p; r < M; r += N)
      for (int c = 0; c < M; c++) begin
        sum = '0;
        for (int k = 0; k < M; k++) begin
          access(p, 0, elem_addr(0, r, k), '0, x);
          access(p, 0, elem_addr(1, k, c), '0, y);
          sum += x * y;
        end
        access(p, 1, elem_addr(2, r, c), sum, dummy);
      end
    phase2_done++;
  endtask

  initial begin
    int start_cycle;
    logic [31:0] v;
    wait (rst_n);
    repeat (2) @(negedge clk);
    for (int p = 0; p < N; p++) begin
      fork
        automatic int pp = p;
        run_proc(pp);
      join_none
    end
    wait (phase1_done == N);
    @(negedge clk);
    start_cycle = cycle;
    wait (phase2_done == N);
    runtime = last_ack_cycle - start_cycle;
    // phase 3: read the result back through processor 0
    @(negedge clk);
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        access(0, 0, elem_addr(2, r, c), '0, v);
        check(v == c_ref[r][c], $sformatf("C[%0d][%0d] = %0d, expected %0d", r, c, v, c_ref[r][c]));
      end
    check(lat_min == 6 * LOGN + 1,
          $sformatf("quickest access %0d cycles, expected %0d", lat_min, 6 * LOGN + 1));
    done = 1;
  end
endmodule
