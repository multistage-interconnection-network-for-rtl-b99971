// mpsoc_top: a multiprocessor system on chip whose processors reach shared
// data memories through multistage interconnection networks.
//
// N processors each have a private instruction memory on a local bus and
// can read and write any of N data memories. The network on chip is two
// N x N MINs: network 1 carries requests from the processors to the data
// memories, network 2 carries the answers (read data or write
// acknowledgements) back. Both are of the type MIN_TYPE (Omega by default).
// The processors themselves are not part of this module: their instruction
// fetch port and their data port are brought out as ports, one array element
// per processor.
//
// Address map: processor p issues a byte address; bits
// [2 +: log2(DMEM_WORDS)] select the word inside a data memory and the next
// log2(N) bits select the data memory, i.e. memory m holds the byte
// addresses m*4*DMEM_WORDS .. (m+1)*4*DMEM_WORDS-1.
//
// Data port protocol (per processor): dreq_* is valid/ready; a request is
// taken when dreq_valid and dreq_ready are high. Every request is answered
// exactly once on dresp_* (valid/ready) with the memory that served it,
// the write flag and, for a read, the data. With no other traffic the answer
// arrives 3*log2(N) cycles (network 1) + 1 cycle (memory) + 3*log2(N)
// cycles (network 2) after the request is taken. Answers of several
// requests in flight to different memories may arrive out of order.
//
// bi_n1 and bi_n2 count blockages in the request and the response network:
// each cycle adds the number of messages that waited at the head of a switch
// FIFO without moving. conf_n1 and conf_n2 count switch outputs asked for by
// two messages at once. All four are cleared by reset.
// The structure (N processors, N instruction and N data memories, a request
// and a response MIN) is the source's; the address map, protocol and
// counting rule are this design's choices.
module mpsoc_top
  import min_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter min_type_e   MIN_TYPE   = MIN_OMEGA,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned IMEM_WORDS = 1024,
  localparam int unsigned LOGN      = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction memories: fetch port and program load port
  input  logic [31:0]     imem_fetch_addr [N],
  output logic [31:0]     imem_fetch_data [N],
  input  logic            imem_load_we    [N],
  input  logic [31:0]     imem_load_addr  [N],
  input  logic [31:0]     imem_load_data  [N],
  // processor data ports: requests
  input  logic            dreq_valid [N],
  output logic            dreq_ready [N],
  input  logic            dreq_we    [N],
  input  logic [31:0]     dreq_addr  [N],
  input  logic [31:0]     dreq_wdata [N],
  // processor data ports: answers
  output logic            dresp_valid [N],
  input  logic            dresp_ready [N],
  output logic            dresp_we    [N],
  output logic [LOGN-1:0] dresp_mem   [N],
  output logic [31:0]     dresp_rdata [N],
  // blockage and conflict counters of network 1 (requests) and 2 (answers)
  output logic [31:0]     bi_n1,
  output logic [31:0]     bi_n2,
  output logic [31:0]     conf_n1,
  output logic [31:0]     conf_n2
);
  localparam int unsigned DMEM_AW = $clog2(DMEM_WORDS);
  localparam int unsigned REQ_W   = $bits(req_t);
  localparam int unsigned RESP_W  = $bits(resp_t);
  localparam int unsigned CW      = $clog2(N * LOGN + 1);

  // request network signals
  logic              n1_in_valid  [N];
  logic              n1_in_ready  [N];
  logic [LOGN-1:0]   n1_in_dest   [N];
  logic [REQ_W-1:0]  n1_in_data   [N];
  logic              n1_out_valid [N];
  logic              n1_out_ready [N];
  logic [LOGN-1:0]   n1_out_dest  [N];
  logic [REQ_W-1:0]  n1_out_data  [N];
  logic [CW-1:0]     n1_blocked, n1_conflict;
  // response network signals
  logic              n2_in_valid  [N];
  logic              n2_in_ready  [N];
  logic [LOGN-1:0]   n2_in_dest   [N];
  logic [RESP_W-1:0] n2_in_data   [N];
  logic              n2_out_valid [N];
  logic              n2_out_ready [N];
  logic [LOGN-1:0]   n2_out_dest  [N];
  logic [RESP_W-1:0] n2_out_data  [N];
  logic [CW-1:0]     n2_blocked, n2_conflict;

  for (genvar p = 0; p < N; p++) begin : g_proc
    req_t  rq;
    resp_t rs;

    instr_memory #(.DEPTH(IMEM_WORDS)) u_imem (
      .clk        (clk),
      .fetch_addr (imem_fetch_addr[p]),
      .fetch_data (imem_fetch_data[p]),
      .load_we    (imem_load_we[p]),
      .load_addr  (imem_load_addr[p]),
      .load_data  (imem_load_data[p])
    );

    // processor side of network 1: build the request message
    always_comb begin
      rq.src   = NODE_W'(p);
      rq.we    = dreq_we[p];
      rq.addr  = dreq_addr[p];
      rq.wdata = dreq_wdata[p];
    end
    assign n1_in_valid[p] = dreq_valid[p];
    assign dreq_ready[p]  = n1_in_ready[p];
    assign n1_in_dest[p]  = dreq_addr[p][2 + DMEM_AW +: LOGN];
    assign n1_in_data[p]  = rq;

    // processor side of network 2: unpack the answer
    assign rs              = resp_t'(n2_out_data[p]);
    assign dresp_valid[p]  = n2_out_valid[p];
    assign n2_out_ready[p] = dresp_ready[p];
    assign dresp_we[p]     = rs.we;
    assign dresp_mem[p]    = rs.mem[LOGN-1:0];
    assign dresp_rdata[p]  = rs.rdata;
  end

  for (genvar m = 0; m < N; m++) begin : g_mem
    resp_t rs;

    data_memory #(.DEPTH(DMEM_WORDS), .MEM_ID(m)) u_dmem (
      .clk        (clk),
      .rst_n      (rst_n),
      .req_valid  (n1_out_valid[m]),
      .req_ready  (n1_out_ready[m]),
      .req        (req_t'(n1_out_data[m])),
      .resp_valid (n2_in_valid[m]),
      .resp_ready (n2_in_ready[m]),
      .resp       (rs)
    );
    assign n2_in_data[m] = rs;
    assign n2_in_dest[m] = rs.dst[LOGN-1:0];
  end

  min_network #(
    .N(N), .PW(REQ_W), .MIN_TYPE(MIN_TYPE), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_net1 (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (n1_in_valid),
    .in_ready       (n1_in_ready),
    .in_dest        (n1_in_dest),
    .in_data        (n1_in_data),
    .out_valid      (n1_out_valid),
    .out_ready      (n1_out_ready),
    .out_dest       (n1_out_dest),
    .out_data       (n1_out_data),
    .blocked_count  (n1_blocked),
    .conflict_count (n1_conflict)
  );

  min_network #(
    .N(N), .PW(RESP_W), .MIN_TYPE(MIN_TYPE), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_net2 (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (n2_in_valid),
    .in_ready       (n2_in_ready),
    .in_dest        (n2_in_dest),
    .in_data        (n2_in_data),
    .out_valid      (n2_out_valid),
    .out_ready      (n2_out_ready),
    .out_dest       (n2_out_dest),
    .out_data       (n2_out_data),
    .blocked_count  (n2_blocked),
    .conflict_count (n2_conflict)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bi_n1   <= '0;
      bi_n2   <= '0;
      conf_n1 <= '0;
      conf_n2 <= '0;
    end else begin
      bi_n1   <= bi_n1   + 32'(n1_blocked);
      bi_n2   <= bi_n2   + 32'(n2_blocked);
      conf_n1 <= conf_n1 + 32'(n1_conflict);
      conf_n2 <= conf_n2 + 32'(n2_conflict);
    end
  end

  // Every message must leave a network on the line of its destination.
  for (genvar i = 0; i < N; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     n1_out_valid[i] |-> n1_out_dest[i] == LOGN'(i))
      else $error("mpsoc_top: request delivered to the wrong memory");
    assert property (@(posedge clk) disable iff (!rst_n)
                     n2_out_valid[i] |-> n2_out_dest[i] == LOGN'(i))
      else $error("mpsoc_top: answer delivered to the wrong processor");
  end
endmodule
