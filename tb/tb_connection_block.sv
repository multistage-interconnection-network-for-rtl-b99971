// tb_connection_block: checks the wiring of the connection blocks of an
// 8-line network for all three network types and all three stages against
// tables written out by hand (line number bits b2 b1 b0):
//   Omega, every stage:       b2 b1 b0 -> b1 b0 b2 (perfect shuffle)
//   Butterfly: stage 0 straight, stage 1 swaps b0/b2, stage 2 swaps b0/b1
//   Baseline:  stage 0 straight, stage 1 rotates b2b1b0 right,
//              stage 2 rotates b1b0 right
// Both the forward data and the returned ready are checked.
module tb_connection_block;
  import min_pkg::*;
  localparam int unsigned N = 8, W = 4;
  int checks = 0, failures = 0;

  // expected output line, [type][stage][input line]
  int unsigned exp_line [3][3][8] = '{
    '{'{0,2,4,6,1,3,5,7}, '{0,2,4,6,1,3,5,7}, '{0,2,4,6,1,3,5,7}},
    '{'{0,1,2,3,4,5,6,7}, '{0,4,2,6,1,5,3,7}, '{0,2,1,3,4,6,5,7}},
    '{'{0,1,2,3,4,5,6,7}, '{0,4,1,5,2,6,3,7}, '{0,2,1,3,4,6,5,7}}
  };

  logic         in_valid  [3][3][N];
  logic         in_ready  [3][3][N];
  logic [W-1:0] in_flit   [3][3][N];
  logic         out_valid [3][3][N];
  logic         out_ready [3][3][N];
  logic [W-1:0] out_flit  [3][3][N];

  for (genvar t = 0; t < 3; t++) begin : g_t
    for (genvar s = 0; s < 3; s++) begin : g_s
      connection_block #(.N(N), .W(W), .MIN_TYPE(min_type_e'(t)), .STAGE(s)) dut (
        .in_valid (in_valid[t][s]),  .in_ready (in_ready[t][s]),  .in_flit (in_flit[t][s]),
        .out_valid(out_valid[t][s]), .out_ready(out_ready[t][s]), .out_flit(out_flit[t][s])
      );
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3; t++)
      for (int s = 0; s < 3; s++)
        for (int i = 0; i < N; i++) begin
          in_flit[t][s][i]  = W'(i);
          in_valid[t][s][i] = (i % 3 == 0);
          out_ready[t][s][i] = (i % 2 == 1);
        end
    #1;
    for (int t = 0; t < 3; t++)
      for (int s = 0; s < 3; s++)
        for (int i = 0; i < N; i++) begin
          int unsigned j;
          j = exp_line[t][s][i];
          check(out_flit[t][s][j] == W'(i),
                $sformatf("type %0d stage %0d: line %0d should reach %0d", t, s, i, j));
          check(out_valid[t][s][j] == (i % 3 == 0), "valid follows the data");
          check(in_ready[t][s][i] == (j % 2 == 1), "ready returns on the same wire");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
