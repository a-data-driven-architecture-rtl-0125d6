// tb_sort_filter: a running median-of-three filter on one cluster, the
// compare-and-select kernel of a rank-order (sorting) image filter.
//
//   y[n] = median(x[n], x[n-1], x[n-2])
//        = max(min(x[n-1], x[n-2]), min(max(x[n-1], x[n-2]), x[n]))
//
// The input stream arrives on level-2 input 0 and is broadcast by the
// level-1 switch to five buffers. The delays x[n-1] and x[n-2] are not
// stored anywhere explicitly: the buffers that must see the delayed stream
// are preloaded with one or two initial tokens (value 0), as in a static
// data-flow graph (DQ0: one token, DQ1: two tokens).
//   nano 0: MIN(x[n-1], x[n-2])             -> nano 3 DQ0
//   nano 1: MAX(x[n-1], x[n-2])             -> nano 2 DQ0
//   nano 2: MIN(nano 1, x[n])               -> nano 3 DQ1
//   nano 3: MAX(nano 0, nano 2)             -> level-2 output 0
// The delays sit in the first stage, where each buffer is drained in the
// cycle it is filled. A buffer that must also wait for a result from an
// earlier stage (nano 2 DQ1) gets no initial token: since busy is taken
// from the registered fill level, a 4-word buffer that runs full would
// hold back the whole broadcast and cost throughput.
// Pixels are 8-bit. Phase 1 streams with random gaps and random
// back-pressure; phase 2 streams at full rate with no back-pressure and
// checks that the filter delivers one result per clock cycle once it is full.
module tb_sort_filter;
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
  localparam int N1 = 100, N2 = 100;

  nano_cluster dut (.clk, .rst_n, .cluster_id(4'd1), .cfg, .*);
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

  logic [15:0] src[$], got[$];
  longint t_out[$];
  longint cyc = 0;
  bit full_rate = 0;

  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    l2_in_send  <= {3'b0, src.size() > 0 && (full_rate || ($urandom % 100) < 70)};
    l2_in_data  <= {48'b0, src.size() > 0 ? src[0] : 16'h0};
    l2_out_busy <= full_rate ? 4'b0 : 4'($urandom % 100 < 30);
  end
  always @(posedge clk) if (rst_n) begin
    if (l2_in_send[0] && !l2_in_busy[0]) void'(src.pop_front());
    if (l2_out_send[0] && !l2_out_busy[0]) begin got.push_back(l2_out_data[0]); t_out.push_back(cyc); end
  end

  task automatic wr(int t, int a, logic [49:0] d);
    @(negedge clk); cfg = mk_cfg(t, a, d); @(negedge clk); cfg = '0;
  endtask

  function automatic logic [15:0] med3(logic [15:0] a, logic [15:0] b, logic [15:0] c);
    logic [15:0] lo, hi, m;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    m  = (hi < c) ? hi : c;
    return (lo < m) ? m : lo;
  endfunction

  // two-operand instruction on DQ0/DQ1, both popped, result on out0
  function automatic instr_t op2(alu_op_e o);
    instr_t p = nop();
    p.op = o; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1;
    p.dq0.rd = 1; p.dq0.pop = 1; p.dq1.rd = 1; p.dq1.pop = 1; p.out_en = 3'b001;
    return p;
  endfunction

  initial begin
    logic [15:0] x[$], e[$];
    cfg = '0; l2c_in_send = 0; l2c_in_data = 0; l2c_out_busy = 0;
    nbr_in_send = 0; nbr_in_data = 0; nbr_out_busy = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // level-1 switch of cluster 1 (target 65): sink k <- source
    wr(65, 0, 8); wr(65, 1, 8);     // nano0 DQ0, DQ1 <- x
    wr(65, 2, 8); wr(65, 3, 8);     // nano1 DQ0, DQ1 <- x
    wr(65, 5, 8);                   // nano2 DQ1 <- x
    wr(65, 4, 2);                   // nano2 DQ0 <- nano1 out0
    wr(65, 6, 0);                   // nano3 DQ0 <- nano0 out0
    wr(65, 7, 4);                   // nano3 DQ1 <- nano2 out0
    wr(65, 8, 6);                   // level-2 output 0 <- nano3 out0
    // programs, initial tokens, run
    for (int j = 4; j < 6; j++) begin
      wr(j, 0, 50'(op2(j == 4 ? OP_MIN : OP_MAX)));
      wr(j, NA_DPUSH + 0, 0); wr(j, NA_DPUSH + 1, 0); wr(j, NA_DPUSH + 1, 0);
    end
    wr(6, 0, 50'(op2(OP_MIN)));
    wr(7, 0, 50'(op2(OP_MAX)));
    for (int j = 4; j < 8; j++) wr(j, NA_MODE, 50'b1000);

    // reference: x[-1] = x[-2] = 0 (the initial tokens)
    x = {16'd0, 16'd0};
    for (int i = 0; i < N1 + N2; i++) begin
      x.push_back(16'($urandom % 256));
      e.push_back(med3(x[i + 2], x[i + 1], x[i]));
    end
    for (int i = 0; i < N1; i++) src.push_back(x[i + 2]);
    for (int g = 0; g < 8000 && got.size() < N1; g++) @(posedge clk);
    check(got.size() == N1, "phase 1 count");

    // phase 2: full rate
    @(negedge clk); full_rate = 1;
    for (int i = N1; i < N1 + N2; i++) src.push_back(x[i + 2]);
    for (int g = 0; g < 8000 && got.size() < N1 + N2; g++) @(posedge clk);
    check(got.size() == N1 + N2, "phase 2 count");
    foreach (e[i])
      check(i < got.size() && got[i] == e[i], $sformatf("median %0d", i));
    // after the first few results of phase 2, one result every cycle
    if (got.size() == N1 + N2)
      for (int i = N1 + 10; i < N1 + N2; i++)
        check(t_out[i] == t_out[i - 1] + 1, $sformatf("rate at %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
