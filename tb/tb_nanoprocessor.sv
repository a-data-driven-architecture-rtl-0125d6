// tb_nanoprocessor: loads small programs through the configuration bus and
// streams tokens with random gaps and random back-pressure:
//   adder node (and one result per cycle when nothing stalls),
//   8-bit x 16-bit Booth multiplication with a register-file accumulator,
//   SWITCH, SELECT, compare with a control-token output,
//   a branch on a control token with zero-cycle latency, initial tokens.
module tb_nanoprocessor;
  import np_pkg::*;
  import np_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [1:0] in_send, in_busy, out_send, out_busy, cin_send, cin_data, cin_busy;
  logic [1:0][15:0] in_data, out_data;
  logic nbr_in_send, nbr_in_busy, nbr_out_send, nbr_out_busy, cout_send, cout_data, cout_busy;
  logic [15:0] nbr_in_data, nbr_out_data;
  logic fire, stall;
  int checks = 0, failures = 0;
  int in_rate = 100, busy_rate = 0;   // percent

  nanoprocessor dut (.clk, .rst_n, .id(7'd5), .cfg, .*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- token sources
  logic [15:0] q_in0[$], q_in1[$], q_nbr[$];
  logic        q_c0[$], q_c1[$];
  // ---------------------------------------------------------- token sinks
  logic [15:0] r_out0[$], r_out1[$], r_nbr[$];
  logic        r_cout[$];
  int          t_out0[$];
  int          cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    in_send[0]  <= q_in0.size() > 0 && ($urandom % 100) < in_rate;
    in_data[0]  <= q_in0.size() > 0 ? q_in0[0] : '0;
    in_send[1]  <= q_in1.size() > 0 && ($urandom % 100) < in_rate;
    in_data[1]  <= q_in1.size() > 0 ? q_in1[0] : '0;
    nbr_in_send <= q_nbr.size() > 0 && ($urandom % 100) < in_rate;
    nbr_in_data <= q_nbr.size() > 0 ? q_nbr[0] : '0;
    cin_send[0] <= q_c0.size() > 0 && ($urandom % 100) < in_rate;
    cin_data[0] <= q_c0.size() > 0 ? q_c0[0] : 1'b0;
    cin_send[1] <= q_c1.size() > 0 && ($urandom % 100) < in_rate;
    cin_data[1] <= q_c1.size() > 0 ? q_c1[0] : 1'b0;
    out_busy[0] <= ($urandom % 100) < busy_rate;
    out_busy[1] <= ($urandom % 100) < busy_rate;
    nbr_out_busy <= ($urandom % 100) < busy_rate;
    cout_busy   <= ($urandom % 100) < busy_rate;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_send[0] && !in_busy[0]) void'(q_in0.pop_front());
    if (in_send[1] && !in_busy[1]) void'(q_in1.pop_front());
    if (nbr_in_send && !nbr_in_busy) void'(q_nbr.pop_front());
    if (cin_send[0] && !cin_busy[0]) void'(q_c0.pop_front());
    if (cin_send[1] && !cin_busy[1]) void'(q_c1.pop_front());
    if (out_send[0] && !out_busy[0]) begin r_out0.push_back(out_data[0]); t_out0.push_back(cyc); end
    if (out_send[1] && !out_busy[1]) r_out1.push_back(out_data[1]);
    if (nbr_out_send && !nbr_out_busy) r_nbr.push_back(nbr_out_data);
    if (cout_send && !cout_busy) r_cout.push_back(cout_data);
  end

  // ---------------------------------------------------------- helpers
  task automatic wr(int addr, logic [49:0] data);
    @(negedge clk);
    cfg = mk_cfg(5, addr, data);
    @(negedge clk);
    cfg = '0;
  endtask

  task automatic restart;
    @(negedge clk);
    rst_n = 0;
    q_in0.delete(); q_in1.delete(); q_nbr.delete(); q_c0.delete(); q_c1.delete();
    r_out0.delete(); r_out1.delete(); r_nbr.delete(); r_cout.delete(); t_out0.delete();
    @(negedge clk);
    rst_n = 1;
  endtask

  task automatic wait_n(ref logic [15:0] q[$], input int n);
    int guard = 0;
    while (q.size() < n && guard < 5000) begin @(posedge clk); guard++; end
    check(q.size() == n, "expected number of results");
  endtask

  function automatic logic [15:0] rnd16(); return 16'($urandom); endfunction

  initial begin
    instr_t p;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ======================== 1. adder node, full rate then back-pressure
    restart;
    p = nop(); p.op = OP_ADD; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1;
    p.dq0.rd = 1; p.dq0.pop = 1; p.dq1.rd = 1; p.dq1.pop = 1; p.out_en = 3'b001;
    wr(NA_INSTR + 0, 50'(p));
    wr(NA_MODE, 50'b1000);
    in_rate = 100; busy_rate = 0;
    begin
      logic [15:0] a[40], b[40];
      for (int i = 0; i < 40; i++) begin a[i] = rnd16(); b[i] = rnd16(); end
      for (int i = 0; i < 20; i++) begin q_in0.push_back(a[i]); q_in1.push_back(b[i]); end
      wait_n(r_out0, 20);
      for (int i = 0; i < 20; i++) check(r_out0[i] == a[i] + b[i], "adder result");
      check(t_out0[19] - t_out0[0] == 19, "one result per cycle");
      r_out0.delete();
      in_rate = 60; busy_rate = 40;
      for (int i = 20; i < 40; i++) begin q_in0.push_back(a[i]); q_in1.push_back(b[i]); end
      wait_n(r_out0, 20);
      for (int i = 0; i < 20; i++) check(r_out0[i] == a[20+i] + b[20+i], "adder result under stalls");
    end

    // ======================== 2. Booth multiply, 8-bit multiplier
    restart;
    p = nop(); p.op = OP_MBLD; p.b_sel = SRC_DQ1; p.dq1.rd = 1; p.dq1.pop = 1; p.npc = 1;
    wr(0, 50'(p));
    p = nop(); p.op = OP_BOOTH; p.a_sel = SRC_ZERO; p.b_sel = SRC_DQ2; p.dq2.rd = 1;
    p.dq0.wb = 1; p.waddr = 0; p.npc = 2;
    wr(1, 50'(p));
    p.a_sel = SRC_DQ0; p.dq0.rd = 1; p.npc = 3; wr(2, 50'(p));
    p.npc = 4; wr(3, 50'(p));
    p.dq0.wb = 0; p.dq2.pop = 1; p.out_en = 3'b101; p.npc = 0; wr(4, 50'(p));
    wr(NA_MODE, 50'b1001);     // DQ0 register file, run
    in_rate = 70; busy_rate = 30;
    begin
      logic [15:0] m[30], c[30];
      for (int i = 0; i < 30; i++) begin
        m[i] = 16'($signed(8'($urandom)));
        c[i] = rnd16();
        q_in1.push_back(m[i]); q_nbr.push_back(c[i]);
      end
      wait_n(r_out0, 30);
      wait_n(r_nbr, 30);
      for (int i = 0; i < 30; i++) begin
        automatic int pr = int'($signed(m[i])) * int'($signed(c[i]));
        check(r_out0[i] == 16'(pr >>> 8), "booth multiply");
        check(r_nbr[i] == 16'(pr >>> 8), "booth multiply on neighbour output");
      end
    end

    // ======================== 3. SWITCH
    restart;
    p = nop(); p.op = OP_PASSA; p.a_sel = SRC_DQ0; p.dq0.rd = 1; p.dq0.pop = 1; p.sw_ctl = 1;
    wr(0, 50'(p)); wr(NA_MODE, 50'b1000);
    begin
      logic [15:0] e0[$], e1[$];
      for (int i = 0; i < 30; i++) begin
        automatic logic [15:0] v = rnd16();
        automatic logic t = 1'($urandom);
        q_in0.push_back(v); q_c0.push_back(t);
        if (t) e1.push_back(v); else e0.push_back(v);
      end
      wait_n(r_out0, e0.size()); wait_n(r_out1, e1.size());
      check(r_out0 == e0 && r_out1 == e1, "switch routing");
    end

    // ======================== 4. SELECT
    restart;
    p = nop(); p.op = OP_PASSA; p.sel_ctl = 1; p.out_en = 3'b001;
    wr(0, 50'(p)); wr(NA_MODE, 50'b1000);
    begin
      logic [15:0] ex[$];
      for (int i = 0; i < 30; i++) begin
        automatic logic [15:0] v = rnd16();
        automatic logic t = 1'($urandom);
        q_c0.push_back(t);
        if (t) q_in1.push_back(v); else q_in0.push_back(v);
        ex.push_back(v);
      end
      wait_n(r_out0, 30);
      check(r_out0 == ex, "select merge");
    end

    // ======================== 5. compare -> control token
    restart;
    p = nop(); p.op = OP_CMP; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1;
    p.dq0.rd = 1; p.dq0.pop = 1; p.dq1.rd = 1; p.dq1.pop = 1; p.cout_en = 1; p.cout_src = CO_N;
    wr(0, 50'(p)); wr(NA_MODE, 50'b1000);
    begin
      logic ex[$];
      for (int i = 0; i < 30; i++) begin
        automatic logic [15:0] a = rnd16(), b = rnd16();
        q_in0.push_back(a); q_in1.push_back(b); ex.push_back($signed(a) < $signed(b));
      end
      for (int g = 0; g < 2000 && r_cout.size() < 30; g++) @(posedge clk);
      check(r_cout == ex, "compare control tokens");
    end

    // ======================== 6. branch on a control token, shifter, initial token
    restart;
    p = nop(); p.op = OP_PASSA; p.a_sel = SRC_DQ0; p.dq0.rd = 1; p.dq0.pop = 1; p.out_en = 3'b001;
    p.cq_rd = 2'b01; p.cq_pop = 2'b01; p.br0 = 2'd3; p.npc = 3'd2;
    wr(0, 50'(p));
    p = nop(); p.op = OP_NOT; p.a_sel = SRC_DQ0; p.dq0.rd = 1; p.dq0.pop = 1; p.out_en = 3'b001; p.npc = 0;
    wr(2, 50'(p));
    p.op = OP_PASSA; p.sh_amt = 3'd3; p.sh_right = 1; wr(3, 50'(p));
    wr(NA_CPUSH + 0, 50'd1);            // initial control token T
    wr(NA_DPUSH + 0, 50'h0F00);          // initial data token
    wr(NA_MODE, 50'b1000);
    begin
      logic [15:0] ex[$];
      logic [15:0] vals[$];
      logic        tok[$];
      vals.push_back(16'h0F00); tok.push_back(1'b1);
      for (int i = 0; i < 24; i++) begin
        automatic logic [15:0] v = rnd16();
        vals.push_back(v); q_in0.push_back(v);
      end
      for (int i = 1; i < 12; i++) begin
        automatic logic t = 1'($urandom);
        tok.push_back(t); q_c0.push_back(t);
      end
      // pairs: first passes unchanged, second is transformed per the token
      for (int i = 0; i < 12; i++) begin
        ex.push_back(vals[2*i]);
        begin
        automatic logic signed [15:0] sv = vals[2*i+1];
        sv = sv >>> 3;
        ex.push_back(tok[i] ? sv : ~vals[2*i+1]);
        end
      end
      wait_n(r_out0, 24);
      check(r_out0 == ex, "branch on control token");
      if (r_out0 != ex) foreach (ex[i]) $display("%0d got %h exp %h", i, r_out0[i], ex[i]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
