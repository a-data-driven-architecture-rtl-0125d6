// l2_network: level-2 network, a semi-crossbar of switchable buses.
//
// The level-2 network joins the nano-clusters, the memory banks and the I/O
// processors. Instead of a full crossbar it has N_BUS buses: each bus is
// statically driven by one source, and each sink statically listens to one
// bus. A bus with several listeners is a broadcast; its busy line is the OR
// of its listeners' busy lines, and a source driving several buses sees the
// OR of those. Unused buses and unconnected sinks are idle; a source on no
// bus sees busy = 0 and its tokens are dropped. The pipeline registers that
// bound the delay of this network sit at the cluster boundary
// (nano_cluster), the memory banks and the I/O processors.
//
// Configuration (cfg.target == id): address b < N_BUS selects the source
// driving bus b; address SA_SINK + k selects the bus sink k listens to.
// Values at or above the count mean not connected.
// The bus-based semi-crossbar follows the architecture; the number of buses
// and the flat (unsegmented) bus layout are this design's own.
module l2_network
  import np_pkg::*;
#(
  parameter int unsigned WIDTH = W,
  parameter int unsigned NSRC  = 76,
  parameter int unsigned NSNK  = 80,
  parameter int unsigned N_BUS = 32
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
  localparam int unsigned BW = $clog2(N_BUS + 1);

  logic [N_BUS-1:0][SW-1:0]    bus_src;
  logic [NSNK-1:0][BW-1:0]     snk_bus;
  logic [N_BUS-1:0]            bus_send, bus_busy;
  logic [N_BUS-1:0][WIDTH-1:0] bus_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N_BUS; b++) bus_src[b] <= SW'(NSRC);
      for (int k = 0; k < NSNK; k++)  snk_bus[k] <= BW'(N_BUS);
    end else if (cfg.we && cfg.target == id) begin
      for (int b = 0; b < N_BUS; b++)
        if (cfg.addr == CFG_AW'(b)) bus_src[b] <= cfg.data[SW-1:0];
      for (int k = 0; k < NSNK; k++)
        if (cfg.addr == CFG_AW'(SA_SINK + k)) snk_bus[k] <= cfg.data[BW-1:0];
    end
  end

  // bus drivers
  always_comb begin
    for (int b = 0; b < N_BUS; b++) begin
      bus_send[b] = 1'b0;
      bus_data[b] = '0;
      for (int s = 0; s < NSRC; s++)
        if (bus_src[b] == SW'(s)) begin
          bus_send[b] = src_send[s];
          bus_data[b] = src_data[s];
        end
    end
  end

  // listeners
  always_comb begin
    for (int k = 0; k < NSNK; k++) begin
      snk_send[k] = 1'b0;
      snk_data[k] = '0;
      for (int b = 0; b < N_BUS; b++)
        if (snk_bus[k] == BW'(b)) begin
          snk_send[k] = bus_send[b];
          snk_data[k] = bus_data[b];
        end
    end
  end

  // wired-OR busy of each bus, kept apart from the send path above
  always_comb begin
    bus_busy = '0;
    for (int k = 0; k < NSNK; k++)
      for (int b = 0; b < N_BUS; b++)
        if (snk_bus[k] == BW'(b)) bus_busy[b] = bus_busy[b] | snk_busy[k];
  end

  // busy back to the sources
  always_comb begin
    src_busy = '0;
    for (int b = 0; b < N_BUS; b++)
      for (int s = 0; s < NSRC; s++)
        if (bus_src[b] == SW'(s)) src_busy[s] = src_busy[s] | bus_busy[b];
  end

endmodule
