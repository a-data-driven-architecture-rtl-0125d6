// nano_cluster: four nanoprocessors joined by the level-1 networks.
//
// Inside a cluster the level-1 data network connects the eight data outputs
// of the four nanoprocessors and N_L2D tokens coming in from the level-2
// network to the eight level-1 data inputs (DQ0, DQ1 of each nanoprocessor)
// and N_L2D channels going out to level 2. A level-1 control network does the
// same for 1-bit control tokens. The neighbour channel runs nano 0 -> 1 ->
// 2 -> 3 inside the cluster and continues through nbr_in / nbr_out to the
// adjacent clusters, so a chain of four can form a pipelined multiplier.
// Every channel crossing to level 2 passes a 2-deep pipeline register in each
// direction, which keeps the level-2 paths short and still moves one token
// per cycle.
//
// Index map of the level-1 data switch (configured at target
// TGT_CLUSTER + cluster index, address = sink, data = source):
//   sources 0..7 = nano j out0/out1 at 2j/2j+1, 8.. = level-2 inputs
//   sinks   0..7 = nano j DQ0/DQ1 at 2j/2j+1,   8.. = level-2 outputs
// Control switch at address SA_CTRL + sink:
//   sources 0..3 = nano j control output, 4.. = level-2 control inputs
//   sinks   0..7 = nano j CQ0/CQ1 at 2j/2j+1,   8.. = level-2 control outputs
// Nanoprocessor j has configuration target 4*cluster_id + j.
// Four nanoprocessors per cluster and the pipeline registers between the two
// network levels follow the architecture; the number of level-2 ports per
// cluster (N_L2D, N_L2C) and the register depth are this design's own.
module nano_cluster
  import np_pkg::*;
#(
  parameter int unsigned N_NANO = 4,
  parameter int unsigned N_L2D  = 4,
  parameter int unsigned N_L2C  = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [3:0]              cluster_id,
  input  cfg_t                    cfg,
  // level-2 data ports
  input  logic [N_L2D-1:0]        l2_in_send,
  input  logic [N_L2D-1:0][W-1:0] l2_in_data,
  output logic [N_L2D-1:0]        l2_in_busy,
  output logic [N_L2D-1:0]        l2_out_send,
  output logic [N_L2D-1:0][W-1:0] l2_out_data,
  input  logic [N_L2D-1:0]        l2_out_busy,
  // level-2 control ports
  input  logic [N_L2C-1:0]        l2c_in_send,
  input  logic [N_L2C-1:0]        l2c_in_data,
  output logic [N_L2C-1:0]        l2c_in_busy,
  output logic [N_L2C-1:0]        l2c_out_send,
  output logic [N_L2C-1:0]        l2c_out_data,
  input  logic [N_L2C-1:0]        l2c_out_busy,
  // neighbour chain
  input  logic                    nbr_in_send,
  input  logic [W-1:0]            nbr_in_data,
  output logic                    nbr_in_busy,
  output logic                    nbr_out_send,
  output logic [W-1:0]            nbr_out_data,
  input  logic                    nbr_out_busy,
  // status
  output logic [N_NANO-1:0]       fire,
  output logic [N_NANO-1:0]       stall
);
  localparam int unsigned DS = 2*N_NANO + N_L2D;  // data sources = data sinks
  localparam int unsigned CS = N_NANO + N_L2C;    // control sources
  localparam int unsigned CK = 2*N_NANO + N_L2C;  // control sinks

  logic [CFG_TW-1:0] cl_id;
  assign cl_id = CFG_TW'(TGT_CLUSTER) + CFG_TW'(cluster_id);

  logic [DS-1:0]        ds_send, ds_busy, dk_send, dk_busy;
  logic [DS-1:0][W-1:0] ds_data, dk_data;
  logic [CS-1:0]        cs_send, cs_data, cs_busy;
  logic [CK-1:0]        ck_send, ck_data, ck_busy;

  l1_network #(.WIDTH(W), .NSRC(DS), .NSNK(DS), .BASE(0)) u_l1d (
    .clk, .rst_n, .id(cl_id), .cfg,
    .src_send(ds_send), .src_data(ds_data), .src_busy(ds_busy),
    .snk_send(dk_send), .snk_data(dk_data), .snk_busy(dk_busy)
  );

  l1_network #(.WIDTH(1), .NSRC(CS), .NSNK(CK), .BASE(SA_CTRL)) u_l1c (
    .clk, .rst_n, .id(cl_id), .cfg,
    .src_send(cs_send), .src_data(cs_data), .src_busy(cs_busy),
    .snk_send(ck_send), .snk_data(ck_data), .snk_busy(ck_busy)
  );

  // neighbour chain
  logic [N_NANO:0]        nb_send, nb_busy;
  logic [N_NANO:0][W-1:0] nb_data;
  assign nb_send[0]   = nbr_in_send;
  assign nb_data[0]   = nbr_in_data;
  assign nbr_in_busy  = nb_busy[0];
  assign nbr_out_send = nb_send[N_NANO];
  assign nbr_out_data = nb_data[N_NANO];
  assign nb_busy[N_NANO] = nbr_out_busy;

  for (genvar j = 0; j < N_NANO; j++) begin : g_nano
    logic [CFG_TW-1:0] nid;
    assign nid = CFG_TW'(N_NANO) * CFG_TW'(cluster_id) + CFG_TW'(j);
    nanoprocessor u_np (
      .clk, .rst_n, .id(nid), .cfg,
      .in_send     (dk_send[2*j+1 -: 2]),
      .in_data     (dk_data[2*j+1 -: 2]),
      .in_busy     (dk_busy[2*j+1 -: 2]),
      .nbr_in_send (nb_send[j]),
      .nbr_in_data (nb_data[j]),
      .nbr_in_busy (nb_busy[j]),
      .out_send    (ds_send[2*j+1 -: 2]),
      .out_data    (ds_data[2*j+1 -: 2]),
      .out_busy    (ds_busy[2*j+1 -: 2]),
      .nbr_out_send(nb_send[j+1]),
      .nbr_out_data(nb_data[j+1]),
      .nbr_out_busy(nb_busy[j+1]),
      .cin_send    (ck_send[2*j+1 -: 2]),
      .cin_data    (ck_data[2*j+1 -: 2]),
      .cin_busy    (ck_busy[2*j+1 -: 2]),
      .cout_send   (cs_send[j]),
      .cout_data   (cs_data[j]),
      .cout_busy   (cs_busy[j]),
      .fire        (fire[j]),
      .stall       (stall[j])
    );
  end

  // pipeline registers between level 1 and level 2
  for (genvar p = 0; p < N_L2D; p++) begin : g_l2d
    logic i_empty, o_empty;
    token_fifo #(.W(W), .DEPTH(2)) u_in (
      .clk, .rst_n,
      .push(l2_in_send[p]), .din(l2_in_data[p]),
      .pop (ds_send[2*N_NANO+p] && !ds_busy[2*N_NANO+p]),
      .dout(ds_data[2*N_NANO+p]), .full(l2_in_busy[p]), .empty(i_empty), .count()
    );
    assign ds_send[2*N_NANO+p] = !i_empty && !ds_busy[2*N_NANO+p];
    token_fifo #(.W(W), .DEPTH(2)) u_out (
      .clk, .rst_n,
      .push(dk_send[2*N_NANO+p]), .din(dk_data[2*N_NANO+p]),
      .pop (l2_out_send[p] && !l2_out_busy[p]),
      .dout(l2_out_data[p]), .full(dk_busy[2*N_NANO+p]), .empty(o_empty), .count()
    );
    assign l2_out_send[p] = !o_empty && !l2_out_busy[p];
  end

  for (genvar p = 0; p < N_L2C; p++) begin : g_l2c
    logic i_empty, o_empty;
    token_fifo #(.W(1), .DEPTH(2)) u_in (
      .clk, .rst_n,
      .push(l2c_in_send[p]), .din(l2c_in_data[p]),
      .pop (cs_send[N_NANO+p] && !cs_busy[N_NANO+p]),
      .dout(cs_data[N_NANO+p]), .full(l2c_in_busy[p]), .empty(i_empty), .count()
    );
    assign cs_send[N_NANO+p] = !i_empty && !cs_busy[N_NANO+p];
    token_fifo #(.W(1), .DEPTH(2)) u_out (
      .clk, .rst_n,
      .push(ck_send[2*N_NANO+p]), .din(ck_data[2*N_NANO+p]),
      .pop (l2c_out_send[p] && !l2c_out_busy[p]),
      .dout(l2c_out_data[p]), .full(ck_busy[2*N_NANO+p]), .empty(o_empty), .count()
    );
    assign l2c_out_send[p] = !o_empty && !l2c_out_busy[p];
  end

endmodule
