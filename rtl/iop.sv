// iop: I/O processor controlling one 16-bit off-chip port.
//
// Each port moves tokens between the level-2 network and the pins of the
// chip, to another nanoprocessor chip or to a memory chip, with the same
// send/busy handshake used on chip. The direction is set at start-up: in
// input mode tokens arriving on the pins (pad_in_*) are buffered and offered
// to the level-2 network; in output mode tokens from the network are
// buffered and driven on the pins (pad_out_*, pad_oe high).
//
// Two neighbouring ports can be linked into one 32-bit port: a linked port
// moves a token only in a cycle where its partner moves one too (the partner
// signals are cross-connected in the chip top), so the two halves of each
// 32-bit word stay aligned.
//
// Configuration (cfg.target == id, address 0): data bit 0 = output mode,
// bit 1 = linked. Buffers are 2 deep, so a stream moves one token per cycle.
// The port width, the handshake and the linking of two ports follow the
// architecture; the IOP is reduced here to this buffering and flow control,
// and its direction bit and linking rule are this design's own.
module iop
  import np_pkg::*;
#(
  parameter int unsigned WIDTH = W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CFG_TW-1:0] id,
  input  cfg_t              cfg,
  // level-2 side
  output logic              net_out_send,   // toward the chip (input mode)
  output logic [WIDTH-1:0]  net_out_data,
  input  logic              net_out_busy,
  input  logic              net_in_send,    // from the chip (output mode)
  input  logic [WIDTH-1:0]  net_in_data,
  output logic              net_in_busy,
  // pins
  input  logic              pad_in_send,
  input  logic [WIDTH-1:0]  pad_in_data,
  output logic              pad_in_busy,
  output logic              pad_out_send,
  output logic [WIDTH-1:0]  pad_out_data,
  input  logic              pad_out_busy,
  output logic              pad_oe,
  // 32-bit linking with the partner port
  output logic              my_ok,          // this half can move a token
  input  logic              partner_ok,
  output logic              moved           // a token moved on the pins
);
  logic out_mode, linked;
  logic f_empty, f_full;
  logic [WIDTH-1:0] f_head;
  logic push, pop, go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_mode <= 1'b0;
      linked   <= 1'b0;
    end else if (cfg.we && cfg.target == id && cfg.addr == '0) begin
      out_mode <= cfg.data[0];
      linked   <= cfg.data[1];
    end
  end

  // pin-side readiness of this half
  assign my_ok = out_mode ? (!f_empty && !pad_out_busy) : (!f_full && pad_in_send);
  assign go    = my_ok && (!linked || partner_ok);

  always_comb begin
    if (out_mode) begin
      push = net_in_send && !f_full;
      pop  = go;
    end else begin
      push = go;
      pop  = net_out_send && !net_out_busy;
    end
  end

  token_fifo #(.W(WIDTH), .DEPTH(2)) u_f (
    .clk, .rst_n, .push, .din(out_mode ? net_in_data : pad_in_data), .pop,
    .dout(f_head), .full(f_full), .empty(f_empty), .count());

  assign net_in_busy  = !out_mode || f_full;
  assign net_out_send = !out_mode && !f_empty && !net_out_busy;
  assign net_out_data = f_head;
  assign pad_in_busy  = out_mode || f_full || (linked && !partner_ok);
  assign pad_out_send = out_mode && go;
  assign pad_out_data = f_head;
  assign pad_oe       = out_mode;
  assign moved        = go;

endmodule
