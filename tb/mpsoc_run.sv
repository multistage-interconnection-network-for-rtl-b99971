// mpsoc_run: one MPSoC configuration (N processors, network type MIN_TYPE)
// together with its matmul_cpus processor model, for testbenches that
// compare several configurations. After `done` it reports the checks of the
// model, the run time of the 8 x 8 matrix product and the blockage counts
// of the request (network 1) and response (network 2) networks.
module mpsoc_run
  import min_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter min_type_e   MIN_TYPE = MIN_OMEGA
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   runtime,
  output int   bi1,
  output int   bi2
);
  localparam int unsigned LOGN = $clog2(N), DMEM_WORDS = 1024;

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
  int n_reads, n_writes, n_held, lat_min, lat_max;

  initial
    for (int p = 0; p < N; p++) begin
      imem_fetch_addr[p] = '0; imem_load_we[p] = 0;
      imem_load_addr[p] = '0; imem_load_data[p] = '0;
    end

  mpsoc_top #(.N(N), .MIN_TYPE(MIN_TYPE), .DMEM_WORDS(DMEM_WORDS)) dut (.*);

  matmul_cpus #(.N(N), .M(8), .DMEM_WORDS(DMEM_WORDS)) cpus (
    .clk, .rst_n, .dreq_valid, .dreq_ready, .dreq_we, .dreq_addr, .dreq_wdata,
    .dresp_valid, .dresp_ready, .dresp_we, .dresp_mem, .dresp_rdata,
    .done, .checks, .failures, .runtime, .n_reads, .n_writes, .n_held,
    .lat_min, .lat_max
  );

  assign bi1 = int'(bi_n1);
  assign bi2 = int'(bi_n2);
endmodule
