// data_memory: one of the N data memories of the MPSoC, sitting between the
// request network (its input) and the response network (its output).
//
// A request carries the requesting processor, a read/write flag, a byte
// address and write data. The memory keeps DEPTH 32-bit words and uses the
// word-address bits addr[2 +: log2(DEPTH)]; higher address bits (which
// select the memory) are ignored. Every request is answered: a read with the
// word read, a write with an acknowledgement once the word is stored. The
// answer goes to the requesting processor and names this memory (MEM_ID).
//
// Timing: a request accepted in cycle t (req_valid && req_ready) is answered
// from cycle t+1 on (resp_valid), and the answer stays until resp_ready.
// req_ready is high when no answer is pending or the pending one leaves in
// this cycle, so back-to-back requests are served one per cycle. The array
// is read and written synchronously, which suits FPGA block RAM. Memory
// contents are not reset. That every access is acknowledged is the source's;
// depth, timing and address use are this design's choices.
module data_memory
  import min_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned MEM_ID = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid,
  output logic  req_ready,
  input  req_t  req,
  output logic  resp_valid,
  input  logic  resp_ready,
  output resp_t resp
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [XLEN-1:0] mem [DEPTH];
  logic [AW-1:0]   widx;
  logic            accept;

  assign widx      = req.addr[2 +: AW];
  assign req_ready = !resp_valid || resp_ready;
  assign accept    = req_valid && req_ready;

  always_ff @(posedge clk) begin
    if (accept) begin
      if (req.we) begin
        mem[widx]  <= req.wdata;
        resp.rdata <= '0;
      end else begin
        resp.rdata <= mem[widx];
      end
      resp.dst <= req.src;
      resp.mem <= NODE_W'(MEM_ID);
      resp.we  <= req.we;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          resp_valid <= 1'b0;
    else if (accept)     resp_valid <= 1'b1;
    else if (resp_ready) resp_valid <= 1'b0;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   resp_valid && !resp_ready |=> resp_valid && $stable(resp))
    else $error("data_memory: answer dropped or changed before it was taken");
endmodule
