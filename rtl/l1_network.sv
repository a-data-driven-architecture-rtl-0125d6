// l1_network: static switch network inside a nano-cluster (level 1).
//
// Channels between nanoprocessors are fixed for the whole run, so the
// network is a set of statically configured multiplexers rather than a
// router: every sink (an input channel) holds a register naming the source
// (an output channel) it listens to. A source heard by several sinks
// broadcasts: its busy line is the OR of the busy lines of all sinks that
// listen to it (the wired-OR busy of the architecture), so a token leaves
// only when every receiver can take it, and all receive it in the same cycle.
// A source nobody listens to sees busy = 0 and its tokens are dropped.
//
// Interface: sel registers are written through the cfg bus when cfg.target
// equals 'id', at address BASE + sink index, with the source index in the
// data (NSRC or above = not connected). The same module serves the 16-bit
// data network and the 1-bit control network. Paths through it are purely
// combinational. The static point-to-point switching and the wired-OR
// broadcast follow the architecture; the full-crossbar form and sizes inside
// a cluster are this design's own.
module l1_network
  import np_pkg::*;
#(
  parameter int unsigned WIDTH = W,
  parameter int unsigned NSRC  = 12,
  parameter int unsigned NSNK  = 12,
  parameter int unsigned BASE  = 0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [CFG_TW-1:0]           id,
  input  cfg_t                        cfg,
  input  logic [NSRC-1:0]             src_send,
  input  logic [NSRC-1:0][WIDTH-1:0]  src_data,
  output logic [NSRC-1:0]             src_busy,
  output logic [NSNK-1:0]             snk_send,
  output logic [NSNK-1:0][WIDTH-1:0]  snk_data,
  input  logic [NSNK-1:0]             snk_busy
);
  localparam int unsigned SW = $clog2(NSRC + 1);

  logic [NSNK-1:0][SW-1:0] sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NSNK; k++) sel[k] <= SW'(NSRC);
    end else if (cfg.we && cfg.target == id) begin
      for (int k = 0; k < NSNK; k++)
        if (cfg.addr == CFG_AW'(BASE + k)) sel[k] <= cfg.data[SW-1:0];
    end
  end

  always_comb begin
    for (int k = 0; k < NSNK; k++) begin
      snk_send[k] = 1'b0;
      snk_data[k] = '0;
      for (int s = 0; s < NSRC; s++)
        if (sel[k] == SW'(s)) begin
          snk_send[k] = src_send[s];
          snk_data[k] = src_data[s];
        end
    end
  end

  // wired-OR busy of each source, kept apart from the send path above
  always_comb begin
    src_busy = '0;
    for (int k = 0; k < NSNK; k++)
      for (int s = 0; s < NSRC; s++)
        if (sel[k] == SW'(s)) src_busy[s] = src_busy[s] | snk_busy[k];
  end

endmodule
