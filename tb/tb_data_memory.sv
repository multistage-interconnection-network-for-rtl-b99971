// tb_data_memory: random reads and writes, with random back-pressure on the
// answer side, against a shadow copy of the memory. Every request must be
// answered once, one cycle after it is taken when the answer side is free,
// with the requester's number, this memory's number, the write flag and, for
// a read, the last value written.
module tb_data_memory;
  import min_pkg::*;
  localparam int unsigned DEPTH = 16, MEM_ID = 5;
  logic  clk = 0, rst_n = 0;
  logic  req_valid = 0, req_ready, resp_valid, resp_ready = 1;
  req_t  req = '0;
  resp_t resp;
  int checks = 0, failures = 0;
  logic [31:0] shadow [DEPTH];
  bit written [DEPTH];
  resp_t exp_q [$];
  int n_stall = 0;

  data_memory #(.DEPTH(DEPTH), .MEM_ID(MEM_ID)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!resp_valid, "no answer after reset");
    // write then read word 3, answer one cycle after the request
    req_valid = 1; req = '{src: 8'd2, we: 1'b1, addr: 32'h0000_800C, wdata: 32'hCAFE_0003};
    @(negedge clk);
    check(resp_valid && resp.we && resp.dst == 8'd2 && resp.mem == 8'(MEM_ID),
          "write acknowledged the next cycle");
    req = '{src: 8'd6, we: 1'b0, addr: 32'h0000_000C, wdata: 32'h0};
    @(negedge clk);
    check(resp_valid && !resp.we && resp.dst == 8'd6 && resp.rdata == 32'hCAFE_0003,
          "read returns the word, upper address bits ignored");
    req_valid = 0;
    shadow[3] = 32'hCAFE_0003; written[3] = 1;
    @(negedge clk);
    check(!resp_valid, "one answer per request");

    for (int c = 0; c < 2000; c++) begin
      bit take;
      resp_t e;
      int idx;
      if (!req_valid || req_ready) begin
        idx = $urandom_range(0, DEPTH - 1);
        req_valid = ($urandom_range(0, 99) < 70);
        req.src   = 8'($urandom_range(0, 15));
        req.we    = $urandom_range(0, 1) == 1 || !written[idx];
        req.addr  = {20'($urandom), 8'(idx), 2'b00} & 32'hFFFF_FFC3 | 32'(idx << 2);
        req.wdata = $urandom;
      end
      resp_ready = ($urandom_range(0, 99) < 60);
      #1;
      if (req_valid && !req_ready) n_stall++;
      if (resp_valid && resp_ready) begin
        check(exp_q.size() != 0, "answer without request");
        if (exp_q.size() != 0) begin
          e = exp_q.pop_front();
          check(resp == e, $sformatf("answer %p expected %p", resp, e));
        end
      end
      take = req_valid && req_ready;
      @(posedge clk);
      if (take) begin
        idx = int'(req.addr[2 +: 4]);
        e.dst = req.src; e.mem = 8'(MEM_ID); e.we = req.we;
        if (req.we) begin
          shadow[idx] = req.wdata; written[idx] = 1; e.rdata = '0;
        end else begin
          e.rdata = shadow[idx];
        end
        exp_q.push_back(e);
      end
      @(negedge clk);
      if (take) req_valid = 0;
    end
    resp_ready = 1;
    repeat (3) @(negedge clk);
    check(exp_q.size() <= 1, "all answers delivered");
    check(n_stall > 0, "requests were held back by a pending answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
