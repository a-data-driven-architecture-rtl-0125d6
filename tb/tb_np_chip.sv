// tb_np_chip: end-to-end run of the full-size chip (default parameters).
//
// The whole configuration is downloaded through the serial port. The
// program: samples enter on port 0, are broadcast on a level-2 bus to
// cluster 0 and back out on port 3 (echo). In cluster 0, nano 0 multiplies
// each sample by a coefficient with four Booth steps and passes the product
// over the neighbour channel; nano 1 compares it with a threshold and sends
// the result plus a control token; nano 2 is a SWITCH: values below the
// threshold go out on port 2, the others are written into memory bank 0. In
// cluster 8 (the other bank) nano 32 generates the memory addresses and R/W
// tokens: write address a, then read address a, then a+1. The read data
// leaves on port 1. Output pins see random back-pressure.
// Checks all three output streams against a model, and counts that every
// mechanism happened: serial frames, broadcast, Booth steps, both SWITCH
// directions, memory writes and reads, stalls, level-2 transfers, both banks.
module tb_np_chip;
  import np_pkg::*;
  import np_tb_pkg::*;

  logic clk = 0, rst_n = 0, ser_en, ser_dat;
  logic [7:0] pad_in_send, pad_in_busy, pad_out_send, pad_out_busy, pad_oe;
  logic [7:0][15:0] pad_in_data, pad_out_data;
  logic [63:0] nano_fire, nano_stall;
  logic [15:0] cfg_frames;
  int checks = 0, failures = 0;
  localparam int N = 40;
  localparam logic [15:0] COEF = 16'h1234;
  localparam logic [15:0] THR  = 16'sd0;

  np_chip dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- serial download
  int n_frames = 0;
  task automatic ser(int tgt, int addr, logic [49:0] data);
    logic [FRAME-1:0] f;
    f = {CFG_TW'(tgt), CFG_AW'(addr), data};
    for (int i = FRAME - 1; i >= 0; i--) begin
      @(negedge clk); ser_en = 1; ser_dat = f[i];
    end
    @(negedge clk); ser_en = 0;
    n_frames++;
  endtask

  // ---------------------------------------------------------- pins
  logic [15:0] src[$], got[4][$], exp_q[4][$];
  int bp_rate = 0;
  always @(negedge clk) begin
    pad_in_send    <= {7'b0, src.size() > 0 && ($urandom % 100) < 80};
    pad_in_data    <= '0;
    pad_in_data[0] <= src.size() > 0 ? src[0] : '0;
    for (int i = 0; i < 8; i++) pad_out_busy[i] <= ($urandom % 100) < bp_rate;
  end
  always @(posedge clk) if (rst_n) begin
    if (pad_in_send[0] && !pad_in_busy[0]) void'(src.pop_front());
    for (int i = 1; i < 4; i++)
      if (pad_out_send[i] && !pad_out_busy[i] && pad_oe[i]) got[i].push_back(pad_out_data[i]);
  end

  // ---------------------------------------------------------- event counters
  int c_fire = 0, c_stall = 0, c_booth = 0, c_mwr = 0, c_mrd = 0, c_bank1 = 0, c_l2 = 0;
  always @(posedge clk) if (rst_n) begin
    c_fire  += $countones(nano_fire);
    c_stall += $countones(nano_stall);
    if (nano_fire[0]) c_booth++;
    if (nano_fire[32]) c_bank1++;
    if (dut.g_mem[0].u_mem.fire_wr) c_mwr++;
    if (dut.g_mem[0].u_mem.fire_rd) c_mrd++;
    c_l2 += $countones(dut.ds_send & ~dut.ds_busy);
  end

  initial begin
    instr_t p;
    ser_en = 0; ser_dat = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // level-2 data buses: (bus, source) then (sink, bus)
    ser(TGT_L2D, 0, 68); ser(TGT_L2D, SA_SINK + 0, 0); ser(TGT_L2D, SA_SINK + 75, 0);
    ser(TGT_L2D, 1, 0);  ser(TGT_L2D, SA_SINK + 65, 1);
    ser(TGT_L2D, 2, 1);  ser(TGT_L2D, SA_SINK + 74, 2);
    ser(TGT_L2D, 3, 32); ser(TGT_L2D, SA_SINK + 64, 3);
    ser(TGT_L2D, 4, 64); ser(TGT_L2D, SA_SINK + 73, 4);
    ser(TGT_L2C, 0, 16); ser(TGT_L2C, SA_SINK + 32, 0);
    // cluster 0 switches
    ser(TGT_CLUSTER + 0, 0, 8);
    ser(TGT_CLUSTER + 0, 4, 2);
    ser(TGT_CLUSTER + 0, 8, 4);
    ser(TGT_CLUSTER + 0, 9, 5);
    ser(TGT_CLUSTER + 0, SA_CTRL + 4, 1);
    // cluster 8 switches
    ser(TGT_CLUSTER + 8, 8, 0);
    ser(TGT_CLUSTER + 8, SA_CTRL + 8, 0);
    // ports: 0 input, 1..3 output
    ser(TGT_IOP + 0, 0, 0); ser(TGT_IOP + 1, 0, 1); ser(TGT_IOP + 2, 0, 1); ser(TGT_IOP + 3, 0, 1);

    // nano 0: y = (x * COEF) >>> 8 with four Booth steps
    p = nop(); p.op = OP_MBLD; p.b_sel = SRC_DQ0; p.dq0.rd = 1; p.dq0.pop = 1; p.npc = 1;
    ser(0, 0, 50'(p));
    p = nop(); p.op = OP_BOOTH; p.a_sel = SRC_ZERO; p.b_sel = SRC_DQ1; p.dq1.rd = 1; p.dq2.wb = 1; p.npc = 2;
    ser(0, 1, 50'(p));
    p.a_sel = SRC_DQ2; p.dq2.rd = 1; p.npc = 3; ser(0, 2, 50'(p));
    p.npc = 4; ser(0, 3, 50'(p));
    p.dq2.wb = 0; p.out_en = 3'b100; p.npc = 0; ser(0, 4, 50'(p));
    ser(0, NA_DQ + 4, 50'(COEF));
    ser(0, NA_MODE, 50'b1110);
    // nano 1: compare with the threshold, pass the value and the flag
    p = nop(); p.op = OP_CMP; p.a_sel = SRC_DQ2; p.b_sel = SRC_DQ1; p.dq2.rd = 1; p.dq2.pop = 1; p.dq1.rd = 1;
    p.out_en = 3'b001; p.cout_en = 1; p.cout_src = CO_N;
    ser(1, 0, 50'(p)); ser(1, NA_DQ + 4, 50'(THR)); ser(1, NA_MODE, 50'b1010);
    // nano 2: SWITCH
    p = nop(); p.op = OP_PASSA; p.a_sel = SRC_DQ0; p.dq0.rd = 1; p.dq0.pop = 1; p.sw_ctl = 1;
    ser(2, 0, 50'(p)); ser(2, NA_MODE, 50'b1000);
    // nano 32: address / R/W generator (counter in DQ0 word 0; DQ1 = 1, 7FFF, 8000)
    p = nop(); p.op = OP_PASSA; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1; p.dq0.rd = 1; p.dq1.rd = 1; p.dq1.addr = 1;
    p.out_en = 3'b001; p.cout_en = 1; p.cout_src = CO_N; p.npc = 1;
    ser(32, 0, 50'(p));
    p.dq1.addr = 2; p.npc = 2; ser(32, 1, 50'(p));
    p = nop(); p.op = OP_ADD; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1; p.dq0.rd = 1; p.dq1.rd = 1; p.dq1.addr = 0;
    p.dq0.wb = 1; p.waddr = 0; p.npc = 0;
    ser(32, 2, 50'(p));
    ser(32, NA_DQ + 4, 50'd1); ser(32, NA_DQ + 5, 50'h7FFF); ser(32, NA_DQ + 6, 50'h8000);
    ser(32, NA_MODE, 50'b1011);

    check(cfg_frames == 16'(n_frames), "all frames received");

    // stream
    bp_rate = 30;
    for (int i = 0; i < N; i++) begin
      automatic logic [15:0] x = 16'($signed(8'($urandom)));
      automatic int pr = int'($signed(x)) * int'($signed(COEF));
      automatic logic signed [15:0] y = 16'(pr >>> 8);
      src.push_back(x);
      exp_q[3].push_back(x);
      if (y < $signed(THR)) exp_q[2].push_back(y); else exp_q[1].push_back(y);
    end
    for (int g = 0; g < 20000 && (got[1].size() < exp_q[1].size() || got[2].size() < exp_q[2].size()
                                  || got[3].size() < N); g++) @(posedge clk);
    repeat (50) @(posedge clk);
    for (int i = 1; i < 4; i++) begin
      check(got[i].size() == exp_q[i].size(), $sformatf("port %0d count %0d of %0d", i, got[i].size(), exp_q[i].size()));
      foreach (exp_q[i][k]) check(k < got[i].size() && got[i][k] == exp_q[i][k], $sformatf("port %0d value %0d", i, k));
    end

    $display("events: frames=%0d fires=%0d stalls=%0d booth=%0d bank1=%0d mem_wr=%0d mem_rd=%0d l2=%0d switchT=%0d switchF=%0d echo=%0d",
             cfg_frames, c_fire, c_stall, c_booth, c_bank1, c_mwr, c_mrd, c_l2, got[2].size(), got[1].size(), got[3].size());
    check(cfg_frames > 0, "serial configuration happened");
    check(c_booth > 0, "Booth steps happened");
    check(c_stall > 0, "stalls happened");
    check(c_bank1 > 0, "second bank active");
    check(c_mwr > 0 && c_mrd > 0, "memory writes and reads happened");
    check(c_l2 > 0, "level-2 transfers happened");
    check(got[1].size() > 0 && got[2].size() > 0, "both SWITCH directions happened");
    check(got[3].size() > 0, "level-2 broadcast happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
