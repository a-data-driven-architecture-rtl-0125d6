// tb_np_ctrl: the firing rule (missing operand, missing control token, busy
// output, busy control output), SELECT and SWITCH steering, and the four-way
// NPC branch from ALU flags and control tokens.
module tb_np_ctrl;
  import np_pkg::*;
  import np_tb_pkg::*;
  logic clk = 0, rst_n = 0, run;
  instr_t instr;
  logic [2:0] dq_avail, out_busy, dq_pop, out_send;
  logic [1:0] cq_avail, cq_head, cq_pop;
  logic cout_busy, flag_n, flag_z, flag_c, fire, stall, cout_send, cout_data, a_from_dq1;
  logic [2:0] pc;
  int checks = 0, failures = 0;

  np_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 1; instr = nop(); dq_avail = '1; cq_avail = '1; cq_head = '0; out_busy = '0;
    cout_busy = 0; flag_n = 0; flag_z = 0; flag_c = 0;
    @(posedge clk); #1 rst_n = 1;
    // add node: needs DQ0, DQ1, writes out0
    instr.dq0.rd = 1; instr.dq0.pop = 1; instr.dq1.rd = 1; instr.dq1.pop = 1; instr.out_en = 3'b001;
    instr.npc = 3'd5;
    #1 check(fire && dq_pop == 3'b011 && out_send == 3'b001, "fires when ready");
    dq_avail = 3'b101; #1 check(!fire && stall && dq_pop == 0 && out_send == 0, "stalls on missing operand");
    dq_avail = '1; out_busy = 3'b001; #1 check(!fire && stall, "stalls on busy output");
    out_busy = 3'b110; #1 check(fire, "busy on unused output is ignored");
    out_busy = 0; run = 0; #1 check(!fire && !stall, "idle when not running");
    run = 1;
    instr.cq_rd = 2'b10; cq_avail = 2'b01; #1 check(!fire, "stalls on missing control token");
    cq_avail = '1; instr.cout_en = 1; cout_busy = 1; #1 check(!fire, "stalls on busy control output");
    cout_busy = 0; #1 check(fire && cout_send, "control output sent");
    @(posedge clk); #1 check(pc == 3'd5, "pc takes npc");
    // SELECT
    instr = nop(); instr.sel_ctl = 1; instr.out_en = 3'b001;
    cq_head = 2'b01; dq_avail = 3'b010; #1 check(fire && a_from_dq1 && dq_pop == 3'b010 && cq_pop == 2'b01, "select T reads DQ1 only");
    cq_head = 2'b00; #1 check(!fire, "select F waits for DQ0");
    dq_avail = 3'b001; #1 check(fire && !a_from_dq1 && dq_pop == 3'b001, "select F reads DQ0 only");
    cq_avail = 2'b10; #1 check(!fire, "select waits for control token");
    cq_avail = '1;
    // SWITCH
    instr = nop(); instr.sw_ctl = 1; instr.out_en = 3'b011; dq_avail = '1;
    cq_head = 2'b01; #1 check(out_send == 3'b010 && cq_pop == 2'b01, "switch T -> out1");
    cq_head = 2'b00; #1 check(out_send == 3'b001, "switch F -> out0");
    out_busy = 3'b010; #1 check(fire, "switch F ignores busy out1");
    out_busy = 3'b001; #1 check(!fire, "switch F stalls on busy out0");
    out_busy = 0;
    // four-way branch: bit0 from N flag, bit1 from CQ1
    instr = nop(); instr.npc = 3'b100; instr.br0 = 2'd1; instr.br1 = 2'd1; instr.cq_rd = 2'b10;
    for (int k = 0; k < 4; k++) begin
      flag_n = k[0]; cq_head = {k[1], 1'b0};
      @(posedge clk); #1 check(pc == (3'b100 | 3'(k)), "four-way branch");
    end
    instr.br0 = 2'd2; instr.br1 = 2'd2; flag_z = 1; flag_c = 0;
    @(posedge clk); #1 check(pc == 3'b101, "branch on Z and C");
    instr.br0 = 2'd3; instr.br1 = 2'd3; cq_head = 2'b01;
    @(posedge clk); #1 check(pc == 3'b111, "branch on CQ0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
