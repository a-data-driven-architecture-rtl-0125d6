// nanoprocessor: data-driven 16-bit processing element.
//
// A nanoprocessor realises one node, or a small cluster of nodes, of a static
// data-flow graph. Three 4-word data buffers (DQ0, DQ1 from the level-1 data
// network, DQ2 from the neighbouring nanoprocessor only) and two control
// queues (CQ0, CQ1, 1-bit tokens from the level-1 control network) feed a
// 16-bit ALU with shifter and Booth step. The result can go to two level-1
// output channels (two outputs make a SWITCH node possible), to the neighbour
// channel, and back into any buffer that works as a register file; a 1-bit
// control token can be sent on the control output.
//
// An 8 x 50-bit instruction store and a local controller with a 3-bit PC
// sequence the node(s); every instruction takes one cycle and fires only when
// its operands are present and its output channels are free (data-driven
// execution), otherwise the nanoprocessor stalls.
//
// Interface: channels use send/busy; a token moves when send=1 and busy=0.
// Output send/data are combinational from the buffer heads (no output
// register); input busy lines are registered full flags. Configuration
// arrives on the cfg bus and is taken when cfg.target equals 'id' (address
// map in np_pkg): instruction words, buffer words, buffer modes, the run bit
// and initial tokens. 'fire' and 'stall' are exported for statistics.
// The organisation follows the architecture; the instruction encoding and the
// configuration map are this design's own.
module nanoprocessor
  import np_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CFG_TW-1:0] id,
  input  cfg_t              cfg,
  // level-1 data inputs (DQ0, DQ1)
  input  logic [1:0]        in_send,
  input  logic [1:0][W-1:0] in_data,
  output logic [1:0]        in_busy,
  // neighbour data input (DQ2)
  input  logic              nbr_in_send,
  input  logic [W-1:0]      nbr_in_data,
  output logic              nbr_in_busy,
  // level-1 data outputs
  output logic [1:0]        out_send,
  output logic [1:0][W-1:0] out_data,
  input  logic [1:0]        out_busy,
  // neighbour data output
  output logic              nbr_out_send,
  output logic [W-1:0]      nbr_out_data,
  input  logic              nbr_out_busy,
  // control inputs (CQ0, CQ1)
  input  logic [1:0]        cin_send,
  input  logic [1:0]        cin_data,
  output logic [1:0]        cin_busy,
  // control output
  output logic              cout_send,
  output logic              cout_data,
  input  logic              cout_busy,
  // status
  output logic              fire,
  output logic              stall
);
  logic        sel;
  logic [2:0]  rf_mode;
  logic        run;
  instr_t      instr;
  logic [IW-1:0] iword;
  logic [PCW-1:0] pc;

  assign sel = cfg.we && (cfg.target == id);

  // mode register: register-file bits and run bit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_mode <= '0;
      run     <= 1'b0;
    end else if (sel && cfg.addr == CFG_AW'(NA_MODE)) begin
      rf_mode <= cfg.data[2:0];
      run     <= cfg.data[3];
    end
  end

  ctrl_store u_store (
    .clk, .rst_n,
    .we   (sel && cfg.addr < CFG_AW'(N_INSTR)),
    .waddr(cfg.addr[PCW-1:0]),
    .wdata(cfg.data[IW-1:0]),
    .raddr(pc),
    .rdata(iword)
  );
  assign instr = instr_t'(iword);

  // ------------------------------------------------------------ buffers
  logic [2:0]        dq_avail, dq_pop, dq_wb, dq_iwe, dq_ipush;
  logic [2:0][W-1:0] dq_head;
  logic [2:0][1:0]   dq_addr;
  logic [2:0]        dq_send, dq_busy;
  logic [2:0][W-1:0] dq_din;
  logic [W-1:0]      y;

  assign dq_send = {nbr_in_send, in_send};
  assign dq_din  = {nbr_in_data, in_data};
  assign {nbr_in_busy, in_busy} = dq_busy;
  assign dq_addr = {instr.dq2.addr, instr.dq1.addr, instr.dq0.addr};
  assign dq_wb   = fire ? {instr.dq2.wb, instr.dq1.wb, instr.dq0.wb} : 3'b000;

  for (genvar i = 0; i < 3; i++) begin : g_dq
    assign dq_iwe[i]   = sel && cfg.addr >= CFG_AW'(NA_DQ + 4*i) && cfg.addr < CFG_AW'(NA_DQ + 4*i + 4);
    assign dq_ipush[i] = sel && cfg.addr == CFG_AW'(NA_DPUSH + i);
    data_buffer u_dq (
      .clk, .rst_n,
      .rf_mode  (rf_mode[i]),
      .in_send  (dq_send[i]),
      .in_data  (dq_din[i]),
      .in_busy  (dq_busy[i]),
      .rd_addr  (dq_addr[i]),
      .head     (dq_head[i]),
      .avail    (dq_avail[i]),
      .pop      (dq_pop[i]),
      .wb_en    (dq_wb[i]),
      .wb_addr  (instr.waddr),
      .wb_data  (y),
      .init_we  (dq_iwe[i]),
      .init_addr(cfg.addr[1:0]),
      .init_push(dq_ipush[i]),
      .init_data(cfg.data[W-1:0])
    );
  end

  // ------------------------------------------------------- control queues
  logic [1:0] cq_avail, cq_empty, cq_full, cq_head, cq_pop, cq_push;
  for (genvar i = 0; i < 2; i++) begin : g_cq
    logic init;
    assign init       = sel && cfg.addr == CFG_AW'(NA_CPUSH + i);
    assign cq_push[i] = cin_send[i] || init;
    token_fifo #(.W(1), .DEPTH(DQ_N)) u_cq (
      .clk, .rst_n,
      .push (cq_push[i]),
      .din  (init ? cfg.data[0] : cin_data[i]),
      .pop  (cq_pop[i]),
      .dout (cq_head[i]),
      .full (cq_full[i]),
      .empty(cq_empty[i]),
      .count()
    );
  end
  assign cq_avail = ~cq_empty;
  assign cin_busy = cq_full;

  // ---------------------------------------------------------- execution
  logic [W-1:0] opa, opb;
  logic         fn, fz, fc, a_dq1;
  logic [2:0]   osend;

  function automatic logic [W-1:0] pick(input src_e s, input logic [2:0][W-1:0] h);
    unique case (s)
      SRC_DQ0: return h[0];
      SRC_DQ1: return h[1];
      SRC_DQ2: return h[2];
      default: return '0;
    endcase
  endfunction

  assign opa = instr.sel_ctl ? (a_dq1 ? dq_head[1] : dq_head[0]) : pick(instr.a_sel, dq_head);
  assign opb = pick(instr.b_sel, dq_head);

  np_alu u_alu (
    .clk, .rst_n,
    .en      (fire),
    .op      (instr.op),
    .a       (opa),
    .b       (opb),
    .sh_right(instr.sh_right),
    .sh_amt  (instr.sh_amt),
    .y       (y),
    .n       (fn),
    .z       (fz),
    .c       (fc)
  );

  np_ctrl u_ctrl (
    .clk, .rst_n,
    .run,
    .instr,
    .dq_avail,
    .cq_avail,
    .cq_head,
    .out_busy ({nbr_out_busy, out_busy}),
    .cout_busy,
    .flag_n   (fn),
    .flag_z   (fz),
    .flag_c   (fc),
    .pc,
    .fire,
    .stall,
    .dq_pop,
    .cq_pop,
    .out_send (osend),
    .cout_send,
    .cout_data,
    .a_from_dq1(a_dq1)
  );

  assign out_send     = osend[1:0];
  assign out_data     = {y, y};
  assign nbr_out_send = osend[2];
  assign nbr_out_data = y;

endmodule
