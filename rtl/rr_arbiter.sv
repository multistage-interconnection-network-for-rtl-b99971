// rr_arbiter: round-robin arbitration between the two inputs of a MIN switch
// that want the same output.
//
// The priority is a single bit, `prio`, naming the input that wins when both
// request. After every grant the granted input becomes the one with the
// lower priority, so two inputs that keep requesting are served alternately.
// A lone request is granted at once. Grants are combinational (same cycle as
// req) and only given while `en` is high, which the switch uses when the
// output stage can take a message. `conflict` flags a cycle in which both
// inputs requested and one of them was refused.
// The one-bit priority and the rule that the winner drops to lowest priority
// are the source's; the reset value (input 0 first) is this design's choice.
module rr_arbiter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [1:0] req,
  output logic [1:0] gnt,
  output logic       conflict
);
  logic prio;  // input that has the higher priority

  always_comb begin
    gnt = 2'b00;
    if (en) begin
      unique case (req)
        2'b01:   gnt = 2'b01;
        2'b10:   gnt = 2'b10;
        2'b11:   gnt = prio ? 2'b10 : 2'b01;
        default: gnt = 2'b00;
      endcase
    end
  end

  assign conflict = en && (req == 2'b11);

  always_ff @(posedge clk) begin
    if (!rst_n)          prio <= 1'b0;
    else if (gnt[0])     prio <= 1'b1;
    else if (gnt[1])     prio <= 1'b0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(gnt[0] && gnt[1]))
    else $error("rr_arbiter: two grants");
  assert property (@(posedge clk) disable iff (!rst_n) ((gnt & ~req) == 2'b00))
    else $error("rr_arbiter: grant without request");
endmodule
