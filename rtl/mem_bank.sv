// mem_bank: on-chip memory bank (128 x 16 bit) working as a data-flow
// memory node.
//
// The bank fires when an address token and a read/write control token are
// present. A control token T means write: the bank then also waits for, and
// consumes, a data token and stores it at the address. F means read: the word
// at the address is produced as a token on the read-data channel. The banks
// sit on the level-2 network like any other node, so programs build buffers
// such as transpose memories or swapped frame banks from memory nodes and
// SWITCH/SELECT operators.
//
// Timing: the array is read synchronously (one cycle, as an SRAM would be),
// so a read token appears in the 3-deep output buffer two cycles after the
// request fired; a read fires only while the output buffer has room for it
// and any read still in flight, which keeps one read per cycle in steady
// state. Each input channel has a 2-deep buffer (busy = full); only bits
// [AW-1:0] of the address token are used. The memory is cleared at reset.
// The size and the memory-node behaviour follow the architecture; buffer
// depths, the read latency and the T = write encoding are this design's own.
module mem_bank
  import np_pkg::*;
#(
  parameter int unsigned WORDS = 128,
  parameter int unsigned WIDTH = W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             addr_send,
  input  logic [WIDTH-1:0] addr_data,
  output logic             addr_busy,
  input  logic             wdata_send,
  input  logic [WIDTH-1:0] wdata_data,
  output logic             wdata_busy,
  input  logic             rw_send,
  input  logic             rw_data,     // 1 = write, 0 = read
  output logic             rw_busy,
  output logic             rdata_send,
  output logic [WIDTH-1:0] rdata_data,
  input  logic             rdata_busy,
  output logic             fire_rd,
  output logic             fire_wr
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];
  logic [WIDTH-1:0] a_head, d_head, rd_q;
  logic             rw_head, a_empty, d_empty, rw_empty, o_empty;
  logic [1:0]       o_count;
  logic             rd_v;
  logic             room;

  token_fifo #(.W(WIDTH), .DEPTH(2)) u_a (
    .clk, .rst_n, .push(addr_send), .din(addr_data), .pop(fire_rd || fire_wr),
    .dout(a_head), .full(addr_busy), .empty(a_empty), .count());
  token_fifo #(.W(WIDTH), .DEPTH(2)) u_d (
    .clk, .rst_n, .push(wdata_send), .din(wdata_data), .pop(fire_wr),
    .dout(d_head), .full(wdata_busy), .empty(d_empty), .count());
  token_fifo #(.W(1), .DEPTH(2)) u_rw (
    .clk, .rst_n, .push(rw_send), .din(rw_data), .pop(fire_rd || fire_wr),
    .dout(rw_head), .full(rw_busy), .empty(rw_empty), .count());

  assign room    = (32'(o_count) + (rd_v ? 32'd1 : 32'd0)) < 32'd3;
  assign fire_wr = !a_empty && !rw_empty && rw_head && !d_empty;
  assign fire_rd = !a_empty && !rw_empty && !rw_head && room;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
      rd_q <= '0;
      rd_v <= 1'b0;
    end else begin
      if (fire_wr) mem[a_head[AW-1:0]] <= d_head;
      if (fire_rd) rd_q <= mem[a_head[AW-1:0]];
      rd_v <= fire_rd;
    end
  end

  token_fifo #(.W(WIDTH), .DEPTH(3)) u_o (
    .clk, .rst_n, .push(rd_v), .din(rd_q), .pop(rdata_send && !rdata_busy),
    .dout(rdata_data), .full(), .empty(o_empty), .count(o_count));
  assign rdata_send = !o_empty && !rdata_busy;

endmodule
