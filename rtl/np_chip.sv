// np_chip: the prototype nanoprocessor array chip.
//
// The chip executes a data-flow graph directly: each node (or small group of
// nodes) is placed on a nanoprocessor, each arc becomes a static channel, and
// every processor fires as soon as its operands are there and its outputs are
// free. There is no global controller; the static channels carry all
// synchronisation.
//
// Contents: N_CLUSTERS nano-clusters of four nanoprocessors, in two banks
// whose clusters are chained through their neighbour channels; N_MEM memory
// banks of MEM_WORDS x 16 bit acting as data-flow memory nodes; N_IOP I/O
// processors, each owning a 16-bit off-chip port (ports 2k and 2k+1 can be
// linked into a 32-bit port); a serial port that downloads the whole
// configuration; and a level-2 network of N_BUS switchable 16-bit buses and
// N_CBUS 1-bit control buses joining all of them.
//
// Level-2 index map (see l2_network for the configuration addresses):
//   data sources  4c+p cluster c output p, 4*NC+m memory m read data,
//                 4*NC+N_MEM+i port i (input mode)
//   data sinks    4c+p cluster c input p, 4*NC+2m memory m address,
//                 4*NC+2m+1 memory m write data, 4*NC+2*N_MEM+i port i
//   ctrl sources  2c+p cluster c control output p
//   ctrl sinks    2c+p cluster c control input p, 2*NC+m memory m R/W token
// Configuration targets: nanoprocessor 4c+j, cluster switch 64+c, level-2
// data 80, level-2 control 81, port 82+i.
//
// Timing: one instruction per nanoprocessor per cycle; a token crossing
// level 2 passes the cluster pipeline registers on both sides (two cycles
// more than a level-1 hop). The counts of clusters, memories and ports and
// the 128-word banks follow the architecture; the bus counts, the number of
// level-2 ports per cluster and the index maps are this design's own.
module np_chip
  import np_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 16,
  parameter int unsigned N_MEM      = 4,
  parameter int unsigned MEM_WORDS  = 128,
  parameter int unsigned N_IOP      = 8,
  parameter int unsigned N_BUS      = 32,
  parameter int unsigned N_CBUS     = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // serial configuration port
  input  logic                          ser_en,
  input  logic                          ser_dat,
  // off-chip ports
  input  logic [N_IOP-1:0]              pad_in_send,
  input  logic [N_IOP-1:0][W-1:0]       pad_in_data,
  output logic [N_IOP-1:0]              pad_in_busy,
  output logic [N_IOP-1:0]              pad_out_send,
  output logic [N_IOP-1:0][W-1:0]       pad_out_data,
  input  logic [N_IOP-1:0]              pad_out_busy,
  output logic [N_IOP-1:0]              pad_oe,
  // activity, one bit per nanoprocessor (for statistics and debug)
  output logic [4*N_CLUSTERS-1:0]       nano_fire,
  output logic [4*N_CLUSTERS-1:0]       nano_stall,
  output logic [15:0]                   cfg_frames
);
  localparam int unsigned NC  = N_CLUSTERS;
  localparam int unsigned DSN = 4*NC + N_MEM + N_IOP;     // level-2 data sources
  localparam int unsigned DKN = 4*NC + 2*N_MEM + N_IOP;   // level-2 data sinks
  localparam int unsigned CSN = 2*NC;                     // level-2 control sources
  localparam int unsigned CKN = 2*NC + N_MEM;             // level-2 control sinks
  localparam int unsigned PER_BANK = NC / 2;

  cfg_t cfg;

  serial_port u_ser (.clk, .rst_n, .ser_en, .ser_dat, .cfg, .frames(cfg_frames));

  logic [DSN-1:0]        ds_send, ds_busy;
  logic [DSN-1:0][W-1:0] ds_data;
  logic [DKN-1:0]        dk_send, dk_busy;
  logic [DKN-1:0][W-1:0] dk_data;
  logic [CSN-1:0]        cs_send, cs_data, cs_busy;
  logic [CKN-1:0]        ck_send, ck_data, ck_busy;

  l2_network #(.WIDTH(W), .NSRC(DSN), .NSNK(DKN), .N_BUS(N_BUS)) u_l2d (
    .clk, .rst_n, .id(CFG_TW'(TGT_L2D)), .cfg,
    .src_send(ds_send), .src_data(ds_data), .src_busy(ds_busy),
    .snk_send(dk_send), .snk_data(dk_data), .snk_busy(dk_busy)
  );

  l2_network #(.WIDTH(1), .NSRC(CSN), .NSNK(CKN), .N_BUS(N_CBUS)) u_l2c (
    .clk, .rst_n, .id(CFG_TW'(TGT_L2C)), .cfg,
    .src_send(cs_send), .src_data(cs_data), .src_busy(cs_busy),
    .snk_send(ck_send), .snk_data(ck_data), .snk_busy(ck_busy)
  );

  // ------------------------------------------------------------ clusters
  logic [NC:0]        nb_send, nb_busy;
  logic [NC:0][W-1:0] nb_data;

  for (genvar c = 0; c < NC; c++) begin : g_cl
    logic          in_send, in_busy;
    logic [W-1:0]  in_data;
    // the neighbour chain runs through each bank and stops at its ends
    if (c % PER_BANK == 0) begin : g_first
      assign in_send = 1'b0;
      assign in_data = '0;
    end else begin : g_next
      assign in_send = nb_send[c];
      assign in_data = nb_data[c];
    end
    assign nb_busy[c] = (c % PER_BANK == 0) ? 1'b0 : in_busy;

    nano_cluster u_cl (
      .clk, .rst_n,
      .cluster_id  (4'(c)),
      .cfg,
      .l2_in_send  (dk_send[4*c+3 -: 4]),
      .l2_in_data  (dk_data[4*c+3 -: 4]),
      .l2_in_busy  (dk_busy[4*c+3 -: 4]),
      .l2_out_send (ds_send[4*c+3 -: 4]),
      .l2_out_data (ds_data[4*c+3 -: 4]),
      .l2_out_busy (ds_busy[4*c+3 -: 4]),
      .l2c_in_send (ck_send[2*c+1 -: 2]),
      .l2c_in_data (ck_data[2*c+1 -: 2]),
      .l2c_in_busy (ck_busy[2*c+1 -: 2]),
      .l2c_out_send(cs_send[2*c+1 -: 2]),
      .l2c_out_data(cs_data[2*c+1 -: 2]),
      .l2c_out_busy(cs_busy[2*c+1 -: 2]),
      .nbr_in_send (in_send),
      .nbr_in_data (in_data),
      .nbr_in_busy (in_busy),
      .nbr_out_send(nb_send[c+1]),
      .nbr_out_data(nb_data[c+1]),
      .nbr_out_busy(nb_busy[c+1]),
      .fire        (nano_fire[4*c+3 -: 4]),
      .stall       (nano_stall[4*c+3 -: 4])
    );
  end
  // the last cluster's neighbour output is not connected
  assign nb_busy[NC] = 1'b0;
  assign nb_send[0]  = 1'b0;
  assign nb_data[0]  = '0;

  // ------------------------------------------------------------ memories
  for (genvar m = 0; m < N_MEM; m++) begin : g_mem
    mem_bank #(.WORDS(MEM_WORDS), .WIDTH(W)) u_mem (
      .clk, .rst_n,
      .addr_send (dk_send[4*NC+2*m]),
      .addr_data (dk_data[4*NC+2*m]),
      .addr_busy (dk_busy[4*NC+2*m]),
      .wdata_send(dk_send[4*NC+2*m+1]),
      .wdata_data(dk_data[4*NC+2*m+1]),
      .wdata_busy(dk_busy[4*NC+2*m+1]),
      .rw_send   (ck_send[2*NC+m]),
      .rw_data   (ck_data[2*NC+m]),
      .rw_busy   (ck_busy[2*NC+m]),
      .rdata_send(ds_send[4*NC+m]),
      .rdata_data(ds_data[4*NC+m]),
      .rdata_busy(ds_busy[4*NC+m]),
      .fire_rd   (),
      .fire_wr   ()
    );
  end

  // ------------------------------------------------------------ I/O ports
  logic [N_IOP-1:0] io_ok;
  for (genvar i = 0; i < N_IOP; i++) begin : g_iop
    iop #(.WIDTH(W)) u_iop (
      .clk, .rst_n,
      .id          (CFG_TW'(TGT_IOP + i)),
      .cfg,
      .net_out_send(ds_send[4*NC+N_MEM+i]),
      .net_out_data(ds_data[4*NC+N_MEM+i]),
      .net_out_busy(ds_busy[4*NC+N_MEM+i]),
      .net_in_send (dk_send[4*NC+2*N_MEM+i]),
      .net_in_data (dk_data[4*NC+2*N_MEM+i]),
      .net_in_busy (dk_busy[4*NC+2*N_MEM+i]),
      .pad_in_send (pad_in_send[i]),
      .pad_in_data (pad_in_data[i]),
      .pad_in_busy (pad_in_busy[i]),
      .pad_out_send(pad_out_send[i]),
      .pad_out_data(pad_out_data[i]),
      .pad_out_busy(pad_out_busy[i]),
      .pad_oe      (pad_oe[i]),
      .my_ok       (io_ok[i]),
      .partner_ok  (io_ok[i ^ 1]),
      .moved       ()
    );
  end

endmodule
