// tb_iop: two ports, first unlinked (one in input mode, one in output mode)
// then linked as a 32-bit output pair; checks data order, the pin handshake
// and that linked halves always move together.
module tb_iop;
  import np_pkg::*;
  import np_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [1:0] net_out_send, net_out_busy, net_in_send, net_in_busy;
  logic [1:0] pad_in_send, pad_in_busy, pad_out_send, pad_out_busy, pad_oe, my_ok, moved;
  logic [1:0][15:0] net_out_data, net_in_data, pad_in_data, pad_out_data;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 2; i++) begin : g
    iop dut (
      .clk, .rst_n, .id(7'(82 + i)), .cfg,
      .net_out_send(net_out_send[i]), .net_out_data(net_out_data[i]), .net_out_busy(net_out_busy[i]),
      .net_in_send(net_in_send[i]), .net_in_data(net_in_data[i]), .net_in_busy(net_in_busy[i]),
      .pad_in_send(pad_in_send[i]), .pad_in_data(pad_in_data[i]), .pad_in_busy(pad_in_busy[i]),
      .pad_out_send(pad_out_send[i]), .pad_out_data(pad_out_data[i]), .pad_out_busy(pad_out_busy[i]),
      .pad_oe(pad_oe[i]), .my_ok(my_ok[i]), .partner_ok(my_ok[1-i]), .moved(moved[i]));
  end
  always #5 clk = ~clk;

  logic [15:0] src[2][$], got[2][$], exp_q[2][$];
  logic from_pad[2];   // 1: port i is fed from the pins, 0: from the network

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) for (int i = 0; i < 2; i++) begin
    automatic logic s = src[i].size() > 0 && ($urandom % 100) < 70;
    pad_in_send[i]  <= from_pad[i] && s;
    net_in_send[i]  <= !from_pad[i] && s;
    pad_in_data[i]  <= src[i].size() > 0 ? src[i][0] : '0;
    net_in_data[i]  <= src[i].size() > 0 ? src[i][0] : '0;
    pad_out_busy[i] <= ($urandom % 100) < 30;
    net_out_busy[i] <= ($urandom % 100) < 30;
  end

  always @(posedge clk) if (rst_n) for (int i = 0; i < 2; i++) begin
    if ((pad_in_send[i] && !pad_in_busy[i]) || (net_in_send[i] && !net_in_busy[i])) void'(src[i].pop_front());
    if (pad_out_send[i] && !pad_out_busy[i]) got[i].push_back(pad_out_data[i]);
    if (net_out_send[i] && !net_out_busy[i]) got[i].push_back(net_out_data[i]);
  end

  // linked halves move in the same cycle
  int linked = 0, pairs = 0;
  always @(posedge clk) if (rst_n && linked != 0) begin
    checks++;
    if (moved[0] != moved[1]) begin failures++; $display("FAIL halves apart"); end
    if (moved[0]) pairs++;
  end

  task automatic wr(int t, int d);
    @(negedge clk); cfg = mk_cfg(t, 0, 50'(d)); @(negedge clk); cfg = '0;
  endtask

  initial begin
    cfg = '0; from_pad[0] = 1; from_pad[1] = 0;
    pad_in_send = 0; net_in_send = 0; pad_in_data = 0; net_in_data = 0; pad_out_busy = 0; net_out_busy = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    wr(82, 0);  // port 0 input
    wr(83, 1);  // port 1 output
    for (int n = 0; n < 50; n++) for (int i = 0; i < 2; i++) begin
      automatic logic [15:0] v = 16'($urandom); src[i].push_back(v); exp_q[i].push_back(v);
    end
    for (int g = 0; g < 3000 && (got[0].size() < 50 || got[1].size() < 50); g++) @(posedge clk);
    checks++; if (got[0] != exp_q[0]) begin failures++; $display("FAIL input port"); end
    checks++; if (got[1] != exp_q[1]) begin failures++; $display("FAIL output port"); end
    checks++; if (pad_oe != 2'b10) begin failures++; $display("FAIL oe"); end
    // linked 32-bit output
    got[0].delete(); got[1].delete(); exp_q[0].delete(); exp_q[1].delete();
    from_pad[0] = 0;
    wr(82, 3); wr(83, 3);
    linked = 1;
    for (int n = 0; n < 60; n++) for (int i = 0; i < 2; i++) begin
      automatic logic [15:0] v = 16'($urandom); src[i].push_back(v); exp_q[i].push_back(v);
    end
    for (int g = 0; g < 3000 && (got[0].size() < 60 || got[1].size() < 60); g++) @(posedge clk);
    linked = 0;
    checks++; if (got[0] != exp_q[0] || got[1] != exp_q[1]) begin failures++; $display("FAIL linked data"); end
    checks++; if (pairs != 60) begin failures++; $display("FAIL linked pairs %0d", pairs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
