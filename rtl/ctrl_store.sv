// ctrl_store: the 8-word x 50-bit instruction store of a nanoprocessor.
//
// Written once at system start-up from the serial configuration port
// (we/waddr/wdata) and read every cycle at the program counter. The read is
// asynchronous, so the instruction addressed by the current PC is decoded in
// the same cycle (every instruction takes one cycle). Size and serial loading
// follow the architecture; clearing to all-zero words at reset is this
// design's choice.
module ctrl_store
  import np_pkg::*;
#(
  parameter int unsigned DEPTH = N_INSTR,
  parameter int unsigned WIDTH = IW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
