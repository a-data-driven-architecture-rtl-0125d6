// data_buffer: the 4-word data buffer (DQ) in front of each ALU input.
//
// A buffer works either as a queue filled from its input channel or as a
// small random-access register file; the mode is part of the static
// configuration. In queue mode the operand is the head of the queue, and an
// instruction may read it without consuming it, so it is held for reuse. In
// register-file mode the operand is the word at rd_addr and the ALU result can
// be written back at wb_addr; the input channel is then closed (busy).
// Contents can be written at start-up (constants, filter coefficients) through
// init_we, and init_push appends an initial token to the queue.
//
// Timing: avail, head are combinational from registered state; pushes, pops
// and writes take effect at the clock edge. busy = queue full (or register
// file mode), so a producer never waits on this cycle's pop.
// The buffer depth and the two modes follow the architecture; the closed
// input in register-file mode is this design's choice.
module data_buffer
  import np_pkg::*;
#(
  parameter int unsigned WIDTH = W,
  parameter int unsigned DEPTH = DQ_N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rf_mode,   // 1: register file, 0: queue
  // input channel
  input  logic                     in_send,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     in_busy,
  // operand side
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         head,
  output logic                     avail,
  input  logic                     pop,
  input  logic                     wb_en,
  input  logic [$clog2(DEPTH)-1:0] wb_addr,
  input  logic [WIDTH-1:0]         wb_data,
  // start-up initialisation
  input  logic                     init_we,
  input  logic [$clog2(DEPTH)-1:0] init_addr,
  input  logic                     init_push,
  input  logic [WIDTH-1:0]         init_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic             full, q_push, q_pop;

  assign full    = (cnt == DEPTH[AW:0]);
  assign in_busy = rf_mode || full;
  assign q_push  = !rf_mode && ((in_send && !full) || (init_push && !full));
  assign q_pop   = !rf_mode && pop && (cnt != 0);
  assign avail   = rf_mode || (cnt != 0);
  assign head    = rf_mode ? mem[rd_addr] : mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (init_we) mem[init_addr] <= init_data;
      else if (rf_mode && wb_en) mem[wb_addr] <= wb_data;
      else if (q_push) mem[wp] <= init_push ? init_data : in_data;
      if (q_push) wp <= wp + 1'b1;
      if (q_pop)  rp <= rp + 1'b1;
      cnt <= cnt + $bits(cnt)'(q_push) - $bits(cnt)'(q_pop);
    end
  end

endmodule
