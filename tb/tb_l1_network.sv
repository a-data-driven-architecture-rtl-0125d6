// tb_l1_network: random switch settings (including broadcasts and open
// sinks); checks every sink's send/data against its selected source and every
// source's busy against the OR of its listeners' busy lines.
module tb_l1_network;
  import np_pkg::*;
  import np_tb_pkg::*;
  localparam int NS = 6, NK = 5;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [NS-1:0] src_send, src_busy;
  logic [NS-1:0][7:0] src_data;
  logic [NK-1:0] snk_send, snk_busy;
  logic [NK-1:0][7:0] snk_data;
  int sel[NK];
  int checks = 0, failures = 0;

  l1_network #(.WIDTH(8), .NSRC(NS), .NSNK(NK), .BASE(0)) dut (.clk, .rst_n, .id(7'd64), .cfg, .*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; src_send = 0; src_data = 0; snk_busy = 0;
    @(negedge clk); rst_n = 1;
    // after reset nothing is connected
    src_send = '1; snk_busy = '1; #1;
    check(snk_send == 0 && src_busy == 0, "reset: open");
    for (int round = 0; round < 50; round++) begin
      for (int k = 0; k < NK; k++) begin
        sel[k] = $urandom % (NS + 1);       // NS = not connected
        @(negedge clk); cfg = mk_cfg(64, k, 50'(sel[k]));
        @(negedge clk); cfg = '0;
      end
      // a configuration write for another target must be ignored
      @(negedge clk); cfg = mk_cfg(65, 0, 50'(0)); @(negedge clk); cfg = '0;
      for (int v = 0; v < 20; v++) begin
        src_send = NS'($urandom); snk_busy = NK'($urandom);
        for (int s = 0; s < NS; s++) src_data[s] = 8'($urandom);
        #1;
        for (int k = 0; k < NK; k++) begin
          if (sel[k] < NS) check(snk_send[k] == src_send[sel[k]] && snk_data[k] == src_data[sel[k]], "sink follows source");
          else check(!snk_send[k], "open sink idle");
        end
        for (int s = 0; s < NS; s++) begin
          automatic logic b = 0;
          for (int k = 0; k < NK; k++) if (sel[k] == s) b |= snk_busy[k];
          check(src_busy[s] == b, "wired-OR busy");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
