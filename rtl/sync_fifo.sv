// sync_fifo: the first-in first-out buffer placed at each input of a MIN
// switch. A message that loses arbitration, or whose output is busy, waits
// here until its path is free, so no message is lost.
//
// Storage is a DEPTH-entry array with a read and a write pointer and an
// occupancy counter. A write (wr_en while not full) is stored at the clock
// edge and the entry is visible at rd_data from the next cycle on; rd_data
// always shows the oldest entry (show-ahead) and rd_en removes it. A read and
// a write in the same cycle are allowed, also when the FIFO is full.
// DEPTH must be a power of two. Reset (active low, synchronous) empties it.
// That a FIFO exists is the source's; depth, show-ahead read and reset are
// this design's choices.
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A read of an empty FIFO or a write into a full one is a protocol error.
  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty)
    else $error("sync_fifo: read while empty");
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_en))
    else $error("sync_fifo: write while full");
endmodule
