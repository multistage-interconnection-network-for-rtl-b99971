// min_pkg: types and constants shared by the multistage interconnection
// network (MIN) and the MPSoC built around it.
//
// - min_type_e selects the network type. The network types differ only in
//   the connection blocks between switch stages; the switches themselves and
//   the self-routing rule are the same for all three.
// - conn_perm() gives, for a connection block, the line that each input
//   line is wired to. All three types route on the destination address most
//   significant bit first: stage s (counted from the sources) looks at
//   destination bit LOGN-1-s, and a 0 takes the upper switch output.
// - req_t and resp_t are the payloads carried by the request network
//   (processor to data memory) and the response network (data memory back to
//   processor). Node numbers are carried in 8-bit fields, enough for 256
//   processors; the 32-bit address and data widths match a 32-bit MIPS core.
package min_pkg;

  typedef enum logic [1:0] {
    MIN_OMEGA     = 2'd0,
    MIN_BUTTERFLY = 2'd1,
    MIN_BASELINE  = 2'd2
  } min_type_e;

  localparam int unsigned XLEN   = 32;  // address and data width of the processors
  localparam int unsigned NODE_W = 8;   // width of node-number fields in the payloads

  // Request: a processor asks a data memory to read or write one word.
  typedef struct packed {
    logic [NODE_W-1:0] src;    // requesting processor
    logic              we;     // 1 = write, 0 = read
    logic [XLEN-1:0]   addr;   // byte address as issued by the processor
    logic [XLEN-1:0]   wdata;  // write data (unused for reads)
  } req_t;

  // Response: the acknowledgement a data memory returns for every request.
  typedef struct packed {
    logic [NODE_W-1:0] dst;    // processor that issued the request
    logic [NODE_W-1:0] mem;    // data memory that served it
    logic              we;     // 1 = acknowledgement of a write
    logic [XLEN-1:0]   rdata;  // read data (zero for a write)
  } resp_t;

  // Wiring of the connection block in front of switch stage `stage` of an
  // N = 2**logn line network: input line `line` drives output line
  // conn_perm(...). Switch k of a stage owns lines 2k (upper) and 2k+1 (lower).
  //   Omega:     perfect shuffle (rotate the line number left by one bit)
  //              in front of every stage.
  //   Butterfly: straight in front of stage 0; in front of stage s > 0 the
  //              line-number bits 0 and logn-s are exchanged.
  //   Baseline:  straight in front of stage 0; in front of stage s > 0 the
  //              low logn-s+1 bits of the line number are rotated right by one
  //              (inverse shuffle inside each sub-network).
  function automatic int unsigned conn_perm(min_type_e t, int unsigned logn,
                                            int unsigned stage, int unsigned line);
    int unsigned nlines;
    int unsigned w;
    int unsigned lowmask;
    int unsigned b0;
    int unsigned bh;
    int unsigned r;
    nlines = 1 << logn;
    r = line;
    case (t)
      MIN_OMEGA: begin
        r = ((line << 1) | (line >> (logn - 1))) & (nlines - 1);
      end
      MIN_BUTTERFLY: begin
        if (stage != 0) begin
          b0 = line & 1;
          bh = (line >> (logn - stage)) & 1;
          r  = line & ~(1 | (1 << (logn - stage)));
          r  = r | bh | (b0 << (logn - stage));
        end
      end
      MIN_BASELINE: begin
        if (stage != 0) begin
          w       = logn - stage + 1;
          lowmask = (1 << w) - 1;
          r = (line & ~lowmask) |
              (((line & lowmask) >> 1) | ((line & 1) << (w - 1)));
        end
      end
      default: r = line;
    endcase
    return r;
  endfunction

endpackage
