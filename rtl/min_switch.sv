// min_switch: the 2x2 routing and arbitration circuit of the MIN.
//
// Each of the two inputs has a FIFO. The message at the head of a FIFO is
// self-routed on one bit of its destination address, bit ROUTE_BIT: 0 asks
// for the upper output (0), 1 for the lower output (1). Each output has a
// round-robin arbiter choosing between the two heads that ask for it, then
// two registers: the arbitration register, loaded with the granted message
// (which is removed from its FIFO), and the output register, which drives the
// next stage. Together with the FIFO write this makes a message cross one
// switch in exactly three clock cycles when nothing is in its way: presented
// in cycle t, it is at the output in cycle t+3. Each output passes one
// message per cycle, so every lost arbitration delays a message by one cycle.
//
// Interface: valid/ready on both sides; a message moves when valid and ready
// are both high. in_ready is "FIFO not full"; out_ready may depend on
// nothing of this switch. Per cycle, blocked[i] marks a message waiting at
// the head of input FIFO i that did not move, and conflict[o] marks output o
// being asked for by both inputs.
// The 2x2 size, the input FIFOs, self-routing and round-robin arbitration and
// the three-cycle stage time are the source's; the split of those three
// cycles into FIFO / arbitration / output register is this design's choice.
module min_switch #(
  parameter int unsigned DW         = 3,   // destination address width (log2 N)
  parameter int unsigned PW         = 16,  // payload width
  parameter int unsigned ROUTE_BIT  = 2,   // destination bit examined here
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid [2],
  output logic          in_ready [2],
  input  logic [DW-1:0] in_dest  [2],
  input  logic [PW-1:0] in_data  [2],
  output logic          out_valid [2],
  input  logic          out_ready [2],
  output logic [DW-1:0] out_dest  [2],
  output logic [PW-1:0] out_data  [2],
  output logic [1:0]    blocked,
  output logic [1:0]    conflict
);
  localparam int unsigned FW = DW + PW;

  logic [FW-1:0] head [2];
  logic [1:0]    empty, full, pop;
  logic [1:0]    req  [2];   // req[o][i]: input i asks for output o
  logic [1:0]    gnt  [2];   // gnt[o][i]
  logic          a_valid [2];
  logic [FW-1:0] a_flit  [2];
  logic          b_valid [2];
  logic [FW-1:0] b_flit  [2];
  logic          b_load  [2];
  logic          a_free  [2];

  for (genvar i = 0; i < 2; i++) begin : g_in
    sync_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (in_valid[i] && !full[i]),
      .wr_data ({in_dest[i], in_data[i]}),
      .full    (full[i]),
      .rd_en   (pop[i]),
      .rd_data (head[i]),
      .empty   (empty[i])
    );
    assign in_ready[i] = !full[i];
  end

  // Self-routing: the destination bit of each head selects the output.
  always_comb begin
    for (int o = 0; o < 2; o++) begin
      for (int i = 0; i < 2; i++) begin
        req[o][i] = !empty[i] && (head[i][PW + ROUTE_BIT] == o[0]);
      end
    end
  end

  for (genvar o = 0; o < 2; o++) begin : g_out
    assign b_load[o] = a_valid[o] && (!b_valid[o] || out_ready[o]);
    assign a_free[o] = !a_valid[o] || b_load[o];

    rr_arbiter u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (a_free[o]),
      .req      (req[o]),
      .gnt      (gnt[o]),
      .conflict (conflict[o])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        a_valid[o] <= 1'b0;
        b_valid[o] <= 1'b0;
      end else begin
        if (a_free[o]) a_valid[o] <= |gnt[o];
        if (b_load[o])             b_valid[o] <= 1'b1;
        else if (out_ready[o])     b_valid[o] <= 1'b0;
      end
    end

    always_ff @(posedge clk) begin
      if (a_free[o] && |gnt[o]) a_flit[o] <= gnt[o][1] ? head[1] : head[0];
      if (b_load[o])            b_flit[o] <= a_flit[o];
    end

    assign out_valid[o] = b_valid[o];
    assign out_dest[o]  = b_flit[o][PW +: DW];
    assign out_data[o]  = b_flit[o][PW-1:0];
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      pop[i]     = gnt[0][i] || gnt[1][i];
      blocked[i] = !empty[i] && !pop[i];
    end
  end

  // A head asks for exactly one output, so it can never be granted twice.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(gnt[0][0] && gnt[1][0]) && !(gnt[0][1] && gnt[1][1]))
    else $error("min_switch: one message granted two outputs");

  // An offered message stays, unchanged, until the next stage takes it.
  for (genvar o = 0; o < 2; o++) begin : g_hold
    assert property (@(posedge clk) disable iff (!rst_n)
                     out_valid[o] && !out_ready[o] |=>
                     out_valid[o] && $stable(out_dest[o]) && $stable(out_data[o]))
      else $error("min_switch: output message withdrawn or changed");
  end
endmodule
