// tb_addr_gen: a two-dimensional address generator on one cluster, producing
// one address per clock cycle. It scans an NX-wide window of a frame whose
// rows are STRIDE words apart, row after row:
//   a = BASE + row * STRIDE + col,  col = 0 .. NX-1
//
// nano 0 (column counter) keeps col - NX in register word DQ0[0] and counts
// it up by one per firing. The zero flag of that sum is both the
// end-of-row control token it sends and the branch condition: on zero it
// branches to a second instruction, which reloads the counter already one
// step on (-NX + 1), so that no cycle is lost at the end of a row.
//   instr 0: DQ0[0] = DQ0[0] + DQ1[0] (=1); token = z; npc = {0, 0, z}
//   instr 1: DQ0[0] = DQ1[1] (= -NX + 1);  token = z (F); npc = 0
// nano 1 (address adder) is a SELECT: it adds 1, or STRIDE - NX + 1 after a
// row end, to the address kept in its register word DQ2[0], writes the sum
// back and sends it out. It is preloaded with BASE - 1 and one F token, so
// its first output is BASE.
// The token stream reaches nano 1 through the level-1 control switch, and
// the addresses leave on level-2 output 0. Phase 1 adds random output
// back-pressure; phase 2 has none and checks one address per cycle.
module tb_addr_gen;
  import np_pkg::*;
  import np_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [3:0] l2_in_send, l2_in_busy, l2_out_send, l2_out_busy;
  logic [3:0][15:0] l2_in_data, l2_out_data;
  logic [1:0] l2c_in_send, l2c_in_data, l2c_in_busy, l2c_out_send, l2c_out_data, l2c_out_busy;
  logic nbr_in_send, nbr_in_busy, nbr_out_send, nbr_out_busy;
  logic [15:0] nbr_in_data, nbr_out_data;
  logic [3:0] fire, stall;
  int checks = 0, failures = 0;
  localparam int NX = 5, STRIDE = 64, N1 = 150, N2 = 150;
  localparam logic [15:0] BASE = 16'h0123;

  nano_cluster dut (.clk, .rst_n, .cluster_id(4'd2), .cfg, .*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] got[$];
  longint t_out[$];
  longint cyc = 0;
  bit full_rate = 0;

  always @(posedge clk) cyc++;
  always @(negedge clk)
    l2_out_busy <= (full_rate || got.size() >= N1 + N2) ? {3'b0, got.size() >= N1 + N2}
                                                        : 4'($urandom % 100 < 40);
  always @(posedge clk) if (rst_n)
    if (l2_out_send[0] && !l2_out_busy[0]) begin got.push_back(l2_out_data[0]); t_out.push_back(cyc); end

  task automatic wr(int t, int a, logic [49:0] d);
    @(negedge clk); cfg = mk_cfg(t, a, d); @(negedge clk); cfg = '0;
  endtask

  initial begin
    instr_t p;
    cfg = '0; l2_in_send = 0; l2_in_data = 0; l2c_in_send = 0; l2c_in_data = 0; l2c_out_busy = 0;
    nbr_in_send = 0; nbr_in_data = 0; nbr_out_busy = 0;
    l2_out_busy = '1;
    repeat (2) @(negedge clk); rst_n = 1;
    // cluster 2 switches (target 66)
    wr(66, SA_CTRL + 2, 0);         // nano1 CQ0 <- nano0 control output
    wr(66, 8, 2);                   // level-2 output 0 <- nano1 out0
    // nano 0 (id 8): column counter
    p = nop(); p.op = OP_ADD; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1;
    p.dq0.rd = 1; p.dq0.wb = 1; p.dq1.rd = 1; p.waddr = 0;
    p.cout_en = 1; p.cout_src = CO_Z; p.npc = 0; p.br0 = 2'd2;
    wr(8, 0, 50'(p));
    p = nop(); p.op = OP_PASSB; p.b_sel = SRC_DQ1; p.dq1.rd = 1; p.dq1.addr = 1;
    p.dq0.wb = 1; p.waddr = 0; p.cout_en = 1; p.cout_src = CO_Z; p.npc = 0;
    wr(8, 1, 50'(p));
    wr(8, NA_DQ + 0, 50'(-16'(NX)));
    wr(8, NA_DQ + 4, 50'(16'd1));
    wr(8, NA_DQ + 5, 50'(-16'(NX) + 16'd1));
    // nano 1 (id 9): address adder
    p = nop(); p.op = OP_ADD; p.sel_ctl = 1; p.b_sel = SRC_DQ2; p.dq2.rd = 1; p.dq2.wb = 1; p.waddr = 0;
    p.cq_rd = 2'b01; p.cq_pop = 2'b01; p.out_en = 3'b001; p.npc = 0;
    wr(9, 0, 50'(p));
    wr(9, NA_DQ + 0, 50'(16'd1));
    wr(9, NA_DQ + 4, 50'(16'(STRIDE - NX + 1)));
    wr(9, NA_DQ + 8, 50'(BASE - 16'd1));
    wr(9, NA_CPUSH + 0, 50'(0));
    // register-file mode for the used buffers, then run (nano 1 first)
    wr(9, NA_MODE, 50'b1111);
    wr(8, NA_MODE, 50'b1011);
    @(negedge clk); l2_out_busy = '0;

    for (int g = 0; g < 8000 && got.size() < N1; g++) @(posedge clk);
    check(got.size() >= N1, "phase 1 count");
    @(negedge clk); full_rate = 1;
    for (int g = 0; g < 8000 && got.size() < N1 + N2; g++) @(posedge clk);
    check(got.size() >= N1 + N2, "phase 2 count");
    for (int i = 0; i < N1 + N2 && i < got.size(); i++)
      check(got[i] == BASE + 16'((i / NX) * STRIDE + (i % NX)),
            $sformatf("address %0d: %h", i, got[i]));
    if (got.size() >= N1 + N2)
      for (int i = N1 + 10; i < N1 + N2; i++)
        check(t_out[i] == t_out[i - 1] + 1, $sformatf("rate at %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
