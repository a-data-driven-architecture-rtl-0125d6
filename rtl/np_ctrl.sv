// np_ctrl: local controller of a nanoprocessor.
//
// It holds the 3-bit program counter and decides every cycle whether the
// current instruction fires. The instruction fires when the nanoprocessor is
// running, every data buffer it reads has a token, every control queue it
// reads has a token, and none of the output channels it writes is busy;
// otherwise the nanoprocessor stalls and nothing changes. On firing the PC
// takes the instruction's NPC field, with bit 0 and/or bit 1 replaced by an
// ALU flag or a control token: a branch of up to four ways with no lost cycle.
//
// The controller also resolves the two data-dependent forms of the data-flow
// operators: SELECT (sel_ctl) reads DQ1 when the control token at the head of
// control queue 0 is T and DQ0 when it is F, consuming only that buffer;
// SWITCH (sw_ctl) sends the result on output 1 for T and on output 0 for F.
// Both imply reading and consuming the control token.
//
// Timing: fire and all strobes are combinational from the instruction, the
// buffer states and the busy lines; the PC updates at the clock edge.
// The PC width, NPC field, branch sources and the stall rule follow the
// architecture; the bit assignment of the branch fields is this design's own.
module np_ctrl
  import np_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  instr_t         instr,
  input  logic [2:0]     dq_avail,
  input  logic [1:0]     cq_avail,
  input  logic [1:0]     cq_head,
  input  logic [2:0]     out_busy,   // {neighbour, out1, out0}
  input  logic           cout_busy,
  input  logic           flag_n,
  input  logic           flag_z,
  input  logic           flag_c,
  output logic [PCW-1:0] pc,
  output logic           fire,
  output logic           stall,
  output logic [2:0]     dq_pop,
  output logic [1:0]     cq_pop,
  output logic [2:0]     out_send,
  output logic           cout_send,
  output logic           cout_data,
  output logic           a_from_dq1   // SELECT chose DQ1
);
  logic [2:0] dq_need, dq_popi;
  logic [1:0] cq_need, cq_popi;
  logic [2:0] oen;
  logic       ready;
  logic [PCW-1:0] npc;

  always_comb begin
    dq_need = {instr.dq2.rd, instr.dq1.rd, instr.dq0.rd};
    dq_popi = {instr.dq2.pop, instr.dq1.pop, instr.dq0.pop};
    cq_need = instr.cq_rd;
    cq_popi = instr.cq_pop;
    oen     = instr.out_en;
    a_from_dq1 = 1'b0;
    if (instr.sel_ctl) begin
      cq_need[0] = 1'b1;
      cq_popi[0] = 1'b1;
      a_from_dq1 = cq_head[0];
      // the operand not selected is neither needed nor consumed
      // the selected token is consumed, as the data-flow SELECT does
      if (cq_head[0]) begin dq_need[1:0] = 2'b10; dq_popi[1:0] = 2'b10; end
      else            begin dq_need[1:0] = 2'b01; dq_popi[1:0] = 2'b01; end
    end
    if (instr.sw_ctl) begin
      cq_need[0] = 1'b1;
      cq_popi[0] = 1'b1;
      oen[1:0]   = cq_head[0] ? 2'b10 : 2'b01;
    end
    // a token cannot be consumed without being needed
    dq_popi = dq_popi & dq_need;
    cq_popi = cq_popi & cq_need;
  end

  // a control token is only looked at when present; sel/sw with an empty
  // control queue stall before its value matters
  assign ready = run
              && ((dq_need & ~dq_avail) == '0)
              && ((cq_need & ~cq_avail) == '0)
              && ((oen & out_busy) == '0)
              && !(instr.cout_en && cout_busy);
  assign fire  = ready;
  assign stall = run && !ready;

  assign dq_pop    = fire ? dq_popi : '0;
  assign cq_pop    = fire ? cq_popi : '0;
  assign out_send  = fire ? oen : '0;
  assign cout_send = fire && instr.cout_en;

  always_comb begin
    unique case (instr.cout_src)
      CO_N:    cout_data = flag_n;
      CO_Z:    cout_data = flag_z;
      CO_C:    cout_data = flag_c;
      default: cout_data = cq_head[0];
    endcase
  end

  always_comb begin
    npc = instr.npc;
    unique case (instr.br0)
      2'd1:    npc[0] = flag_n;
      2'd2:    npc[0] = flag_z;
      2'd3:    npc[0] = cq_head[0];
      default: ;
    endcase
    unique case (instr.br1)
      2'd1:    npc[1] = cq_head[1];
      2'd2:    npc[1] = flag_c;
      2'd3:    npc[1] = cq_head[0];
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pc <= '0;
    else if (fire) pc <= npc;
  end

endmodule
