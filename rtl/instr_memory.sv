// instr_memory: the private instruction memory of one processor, on its
// local bus.
//
// DEPTH 32-bit words. The processor side is a read-only fetch port: the word
// at byte address fetch_addr (word index fetch_addr[2 +: log2(DEPTH)]) is on
// fetch_data one cycle later. A separate write port loads the program before
// the processors start, playing the part of a memory initialisation file.
// Both ports are synchronous; nothing is reset. That each processor has its
// own instruction memory on a local bus is the source's; size, timing and the
// load port are this design's choices.
module instr_memory #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32
) (
  input  logic         clk,
  input  logic [31:0]  fetch_addr,
  output logic [W-1:0] fetch_data,
  input  logic         load_we,
  input  logic [31:0]  load_addr,
  input  logic [W-1:0] load_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[2 +: AW]] <= load_data;
    fetch_data <= mem[fetch_addr[2 +: AW]];
  end
endmodule
