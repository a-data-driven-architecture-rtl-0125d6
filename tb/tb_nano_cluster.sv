// tb_nano_cluster: programs a four-processor pipeline in one cluster through
// the configuration bus and streams data through it from a level-2 input:
//   nano 0: x + K (K in a register-file word)   -> neighbour channel
//   nano 1: (neighbour token) << 1              -> level-1, broadcast to 2 and 3
//   nano 2: NOT                                 -> level-2 data output 0
//   nano 3: compare with T, send the N flag     -> level-2 control output 0
// Checks both output streams against a model under random level-2
// back-pressure, and that a level-2 input token reaches nano 0 via the
// pipeline register.
module tb_nano_cluster;
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
  localparam logic [15:0] K = 16'd1234, T = 16'sd300;

  nano_cluster dut (.clk, .rst_n, .cluster_id(4'd1), .cfg, .*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] src[$], got_d[$], exp_d[$];
  logic got_c[$], exp_c[$];

  always @(negedge clk) begin
    l2_in_send  <= {3'b0, src.size() > 0 && ($urandom % 100) < 80};
    l2_in_data  <= {48'b0, src.size() > 0 ? src[0] : 16'h0};
    l2_out_busy <= 4'($urandom % 100 < 30);
    l2c_out_busy <= 2'($urandom % 100 < 30);
  end
  always @(posedge clk) if (rst_n) begin
    if (l2_in_send[0] && !l2_in_busy[0]) void'(src.pop_front());
    if (l2_out_send[0] && !l2_out_busy[0]) got_d.push_back(l2_out_data[0]);
    if (l2c_out_send[0] && !l2c_out_busy[0]) got_c.push_back(l2c_out_data[0]);
  end

  task automatic wr(int t, int a, logic [49:0] d);
    @(negedge clk); cfg = mk_cfg(t, a, d); @(negedge clk); cfg = '0;
  endtask

  initial begin
    instr_t p;
    cfg = '0; l2c_in_send = 0; l2c_in_data = 0; nbr_in_send = 0; nbr_in_data = 0; nbr_out_busy = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // switches of cluster 1 (target 65)
    wr(65, 0, 8);            // nano0 DQ0 <- level-2 input 0
    wr(65, 4, 2);            // nano2 DQ0 <- nano1 out0
    wr(65, 6, 2);            // nano3 DQ0 <- nano1 out0 (broadcast)
    wr(65, 8, 4);            // level-2 output 0 <- nano2 out0
    wr(65, SA_CTRL + 8, 3);  // level-2 control output 0 <- nano3 control output
    // nano 0 (id 4)
    p = nop(); p.op = OP_ADD; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1;
    p.dq0.rd = 1; p.dq0.pop = 1; p.dq1.rd = 1; p.out_en = 3'b100;
    wr(4, 0, 50'(p)); wr(4, NA_DQ + 4, 50'(K)); wr(4, NA_MODE, 50'b1010);
    // nano 1
    p = nop(); p.op = OP_PASSA; p.a_sel = SRC_DQ2; p.dq2.rd = 1; p.dq2.pop = 1; p.sh_amt = 1; p.out_en = 3'b001;
    wr(5, 0, 50'(p)); wr(5, NA_MODE, 50'b1000);
    // nano 2
    p = nop(); p.op = OP_NOT; p.a_sel = SRC_DQ0; p.dq0.rd = 1; p.dq0.pop = 1; p.out_en = 3'b001;
    wr(6, 0, 50'(p)); wr(6, NA_MODE, 50'b1000);
    // nano 3
    p = nop(); p.op = OP_CMP; p.a_sel = SRC_DQ0; p.b_sel = SRC_DQ1; p.dq0.rd = 1; p.dq0.pop = 1; p.dq1.rd = 1;
    p.cout_en = 1; p.cout_src = CO_N;
    wr(7, 0, 50'(p)); wr(7, NA_DQ + 4, 50'(T)); wr(7, NA_MODE, 50'b1010);
    for (int i = 0; i < 60; i++) begin
      automatic logic [15:0] x = (i < 30) ? 16'($urandom % 600) - 16'd300 : 16'($urandom);
      automatic logic signed [15:0] y = (x + K) << 1;
      src.push_back(x); exp_d.push_back(~y); exp_c.push_back(y < $signed(T));
    end
    for (int g = 0; g < 5000 && (got_d.size() < 60 || got_c.size() < 60); g++) @(posedge clk);
    checks++; if (got_d.size() != 60 || got_c.size() != 60) begin failures++; $display("FAIL counts %0d %0d", got_d.size(), got_c.size()); end
    foreach (exp_d[i]) begin
      checks++; if (i >= got_d.size() || got_d[i] != exp_d[i]) begin failures++; $display("FAIL data %0d", i); end
      checks++; if (i >= got_c.size() || got_c[i] != exp_c[i]) begin failures++; $display("FAIL control %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
