// min_network: an N x N multistage interconnection network (MIN) of 2x2
// switches with self-routing, used both as the request network and as the
// response network of the MPSoC.
//
// The network has LOGN = log2(N) stages. Stage s is a connection block (the
// wiring that makes the network an Omega, Butterfly or Baseline network)
// followed by a column of N/2 min_switch instances; switch k of a stage owns
// lines 2k and 2k+1. Stage s routes on destination bit LOGN-1-s, so the
// message leaves the last stage on the output line equal to its destination.
// An input message is a destination number plus a PW-bit payload.
//
// Timing: every switch takes three cycles, so a message that meets no other
// message takes 3*LOGN cycles from input to output; each lost arbitration
// adds one cycle, so a message that waits behind all N-1 others arrives after
// 3*LOGN + N-1 cycles. Flow control is valid/ready on every line; an input
// is ready while the FIFO of the first-stage switch behind it has room.
// blocked_count is the number of messages that waited at a switch head in
// this cycle and conflict_count the number of switch outputs asked for by
// two messages in this cycle; the MPSoC sums them into blockage counters.
// The structure, self-routing and latencies follow the source; the flow
// control and the counting rule are this design's choices.
module min_network
  import min_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned PW         = 16,
  parameter min_type_e   MIN_TYPE   = MIN_OMEGA,
  parameter int unsigned FIFO_DEPTH = 64,
  localparam int unsigned LOGN      = $clog2(N),
  localparam int unsigned CW        = $clog2(N * LOGN + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid  [N],
  output logic            in_ready  [N],
  input  logic [LOGN-1:0] in_dest   [N],
  input  logic [PW-1:0]   in_data   [N],
  output logic            out_valid [N],
  input  logic            out_ready [N],
  output logic [LOGN-1:0] out_dest  [N],
  output logic [PW-1:0]   out_data  [N],
  output logic [CW-1:0]   blocked_count,
  output logic [CW-1:0]   conflict_count
);
  localparam int unsigned FW = LOGN + PW;

  // Line signals in front of each stage (index s) and after the last (LOGN).
  logic          l_valid [LOGN+1][N];
  logic          l_ready [LOGN+1][N];
  logic [FW-1:0] l_flit  [LOGN+1][N];
  // After the connection block of stage s.
  logic          c_valid [LOGN][N];
  logic          c_ready [LOGN][N];
  logic [FW-1:0] c_flit  [LOGN][N];
  logic [1:0]    sw_blocked  [LOGN][N/2];
  logic [1:0]    sw_conflict [LOGN][N/2];

  for (genvar i = 0; i < N; i++) begin : g_io
    assign l_valid[0][i]  = in_valid[i];
    assign l_flit[0][i]   = {in_dest[i], in_data[i]};
    assign in_ready[i]    = l_ready[0][i];
    assign out_valid[i]   = l_valid[LOGN][i];
    assign out_dest[i]    = l_flit[LOGN][i][PW +: LOGN];
    assign out_data[i]    = l_flit[LOGN][i][PW-1:0];
    assign l_ready[LOGN][i] = out_ready[i];
  end

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    connection_block #(
      .N(N), .W(FW), .MIN_TYPE(MIN_TYPE), .STAGE(s)
    ) u_conn (
      .in_valid  (l_valid[s]),
      .in_ready  (l_ready[s]),
      .in_flit   (l_flit[s]),
      .out_valid (c_valid[s]),
      .out_ready (c_ready[s]),
      .out_flit  (c_flit[s])
    );

    for (genvar k = 0; k < N/2; k++) begin : g_sw
      logic          sw_in_valid  [2];
      logic          sw_in_ready  [2];
      logic [LOGN-1:0] sw_in_dest [2];
      logic [PW-1:0] sw_in_data   [2];
      logic          sw_out_valid [2];
      logic          sw_out_ready [2];
      logic [LOGN-1:0] sw_out_dest [2];
      logic [PW-1:0] sw_out_data  [2];

      for (genvar p = 0; p < 2; p++) begin : g_port
        assign sw_in_valid[p]       = c_valid[s][2*k+p];
        assign sw_in_dest[p]        = c_flit[s][2*k+p][PW +: LOGN];
        assign sw_in_data[p]        = c_flit[s][2*k+p][PW-1:0];
        assign c_ready[s][2*k+p]    = sw_in_ready[p];
        assign l_valid[s+1][2*k+p]  = sw_out_valid[p];
        assign l_flit[s+1][2*k+p]   = {sw_out_dest[p], sw_out_data[p]};
        assign sw_out_ready[p]      = l_ready[s+1][2*k+p];
      end

      min_switch #(
        .DW(LOGN), .PW(PW), .ROUTE_BIT(LOGN-1-s), .FIFO_DEPTH(FIFO_DEPTH)
      ) u_sw (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (sw_in_valid),
        .in_ready  (sw_in_ready),
        .in_dest   (sw_in_dest),
        .in_data   (sw_in_data),
        .out_valid (sw_out_valid),
        .out_ready (sw_out_ready),
        .out_dest  (sw_out_dest),
        .out_data  (sw_out_data),
        .blocked   (sw_blocked[s][k]),
        .conflict  (sw_conflict[s][k])
      );
    end
  end

  always_comb begin
    blocked_count  = '0;
    conflict_count = '0;
    for (int s = 0; s < LOGN; s++) begin
      for (int k = 0; k < N/2; k++) begin
        blocked_count  = blocked_count  + CW'(sw_blocked[s][k][0])  + CW'(sw_blocked[s][k][1]);
        conflict_count = conflict_count + CW'(sw_conflict[s][k][0]) + CW'(sw_conflict[s][k][1]);
      end
    end
  end
endmodule
