// connection_block: the fixed wiring in front of one switch stage of the MIN.
//
// It is pure wiring: input line i is connected to output line
// min_pkg::conn_perm(MIN_TYPE, LOGN, STAGE, i), and the ready signal of that
// output line is returned to input line i. Changing only these blocks turns
// the network into an Omega, Butterfly or Baseline network; see min_pkg for
// the three wirings. Each line carries a valid bit, a W-bit message and a
// ready bit flowing the other way. No clock, no state, no delay.
// That the connection blocks alone set the network type is the source's; the
// exact bit permutations are the textbook wirings of the three networks.
module connection_block
  import min_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned W        = 8,
  parameter min_type_e   MIN_TYPE = MIN_OMEGA,
  parameter int unsigned STAGE    = 0
) (
  input  logic         in_valid  [N],
  output logic         in_ready  [N],
  input  logic [W-1:0] in_flit   [N],
  output logic         out_valid [N],
  input  logic         out_ready [N],
  output logic [W-1:0] out_flit  [N]
);
  localparam int unsigned LOGN = $clog2(N);

  for (genvar i = 0; i < N; i++) begin : g_line
    localparam int unsigned J = conn_perm(MIN_TYPE, LOGN, STAGE, i);
    assign out_valid[J] = in_valid[i];
    assign out_flit[J]  = in_flit[i];
    assign in_ready[i]  = out_ready[J];
  end
endmodule
