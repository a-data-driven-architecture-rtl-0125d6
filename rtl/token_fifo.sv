// token_fifo: bounded first-in first-out channel buffer.
//
// Arcs of a data-flow graph are bounded FIFO queues. This module is used
// wherever a channel needs storage: the control queues of a nanoprocessor,
// the pipeline registers between the level-1 and level-2 networks, and the
// input and output buffers of memory banks and I/O processors.
//
// Interface: push/din write a token (ignored while full), pop reads the head
// (ignored while empty). full and empty are registered state, so a producer's
// busy = full never depends on the consumer's pop in the same cycle; with
// DEPTH >= 2 a stream still moves one token per cycle. A push and a pop may
// happen in the same cycle. The depth is this design's own choice.
module token_fifo #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wp] <= din;
        wp      <= inc(wp);
      end
      if (do_pop) rp <= inc(rp);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

endmodule
