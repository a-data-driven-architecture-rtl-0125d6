// tb_l2_network: random bus drivers and bus listeners; checks each sink's
// send/data against the source driving its bus and each source's busy
// against the OR over every listener of every bus it drives.
module tb_l2_network;
  import np_pkg::*;
  import np_tb_pkg::*;
  localparam int NS = 7, NK = 9, NB = 4;
  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic [NS-1:0] src_send, src_busy;
  logic [NS-1:0][7:0] src_data;
  logic [NK-1:0] snk_send, snk_busy;
  logic [NK-1:0][7:0] snk_data;
  int bsrc[NB], kbus[NK];
  int checks = 0, failures = 0;

  l2_network #(.WIDTH(8), .NSRC(NS), .NSNK(NK), .N_BUS(NB)) dut (.clk, .rst_n, .id(7'd80), .cfg, .*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); cfg = mk_cfg(80, a, 50'(d)); @(negedge clk); cfg = '0;
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
    for (int round = 0; round < 50; round++) begin
      for (int b = 0; b < NB; b++) begin bsrc[b] = $urandom % (NS + 1); wr(b, bsrc[b]); end
      for (int k = 0; k < NK; k++) begin kbus[k] = $urandom % (NB + 1); wr(SA_SINK + k, kbus[k]); end
      for (int v = 0; v < 20; v++) begin
        src_send = NS'($urandom); snk_busy = NK'($urandom);
        for (int s = 0; s < NS; s++) src_data[s] = 8'($urandom);
        #1;
        for (int k = 0; k < NK; k++) begin
          if (kbus[k] < NB && bsrc[kbus[k]] < NS)
            check(snk_send[k] == src_send[bsrc[kbus[k]]] && snk_data[k] == src_data[bsrc[kbus[k]]], "sink follows bus");
          else check(!snk_send[k], "idle sink");
        end
        for (int s = 0; s < NS; s++) begin
          automatic logic bz = 0;
          for (int b = 0; b < NB; b++)
            if (bsrc[b] == s)
              for (int k = 0; k < NK; k++) if (kbus[k] == b) bz |= snk_busy[k];
          check(src_busy[s] == bz, "busy through buses");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
